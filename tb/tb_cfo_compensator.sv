// Unit test of cfo_compensator: random 5-bit samples through the four
// lanes, first with no increment loaded (pass-through with gain 127/128),
// then after loading a random phase increment. The reference rotates each
// sample by exp(j*phi) in real arithmetic, phi = (vector*4 + lane) * inc
// counted from the load, scales by 127/128 and rounds; results must agree
// within 1 LSB (table and rounding differences) and stay inside 6 bits.
// Latency must be two valid vectors.
module tb_cfo_compensator;
  import sync_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, load = 0, in_valid = 0;
  logic signed [PHASE_W-1:0] phase_inc = '0;
  adc_sample_t in_vec [LANES];
  logic out_valid;
  comp_sample_t out_vec [LANES];
  cfo_compensator dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, queued in input order
  real exp_re [$], exp_im [$];
  int  n_out = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 0; i < LANES; i++) begin
      real er, ei;
      er = exp_re.pop_front();
      ei = exp_im.pop_front();
      if (er > 31.0) er = 31.0; if (er < -32.0) er = -32.0;
      if (ei > 31.0) ei = 31.0; if (ei < -32.0) ei = -32.0;
      chk(real'(out_vec[i].re) - er <= 1.01 && er - real'(out_vec[i].re) <= 1.01 &&
          real'(out_vec[i].im) - ei <= 1.01 && ei - real'(out_vec[i].im) <= 1.01,
          $sformatf("vector %0d lane %0d: %0d,%0d expected %0.2f,%0.2f", n_out, i, out_vec[i].re, out_vec[i].im, er, ei));
    end
    n_out++;
  end

  task automatic run(input int nvec, input real inc_rad);
    for (int v = 0; v < nvec; v++) begin
      @(negedge clk);
      for (int i = 0; i < LANES; i++) begin
        int xr, xi;
        real ph;
        xr = int'($urandom_range(31, 0)) - 16;
        xi = int'($urandom_range(31, 0)) - 16;
        in_vec[i].re = ADC_W'(xr);
        in_vec[i].im = ADC_W'(xi);
        ph = inc_rad * real'(v * LANES + i);
        exp_re.push_back((real'(xr) * $cos(ph) - real'(xi) * $sin(ph)) * 127.0 / 128.0);
        exp_im.push_back((real'(xr) * $sin(ph) + real'(xi) * $cos(ph)) * 127.0 / 128.0);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(1, 0) != 0) @(negedge clk);
    end
  endtask

  initial begin
    int inc;
    real inc_rad;
    for (int i = 0; i < LANES; i++) in_vec[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(50, 0.0);
    repeat (6) @(negedge clk);
    // latency: one vector in, out_valid two cycles later
    for (int k = 0; k < 4; k++) begin
      inc = int'($urandom_range(400000, 0)) - 200000;
      inc_rad = real'(inc) / (2.0 ** PHASE_W) * 2.0 * PI;
      @(negedge clk);
      phase_inc = PHASE_W'(inc);
      load = 1;
      @(negedge clk);
      load = 0;
      run(300, inc_rad);
      repeat (6) @(negedge clk);
    end
    @(negedge clk);
    for (int i = 0; i < LANES; i++) in_vec[i] = '0;
    exp_re.push_back(0.0); exp_im.push_back(0.0); exp_re.push_back(0.0); exp_im.push_back(0.0);
    exp_re.push_back(0.0); exp_im.push_back(0.0); exp_re.push_back(0.0); exp_im.push_back(0.0);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    chk(!out_valid, "no output after one cycle");
    @(negedge clk);
    chk(out_valid, "output after two cycles");
    repeat (3) @(negedge clk);
    chk(n_out == 50 + 4 * 300 + 1, $sformatf("%0d output vectors", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
