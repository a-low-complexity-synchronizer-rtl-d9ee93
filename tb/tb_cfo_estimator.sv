// Unit test of cfo_estimator: random AC vectors of all angles (and the
// axes) and magnitudes 10..127. The expected angle is atan2 of the
// integer inputs, in units of 2*pi/2^16; the expected increment is that
// angle * 2^8 / 165. Tolerance: 20 angle units (0.11 degree). ce pulses every fourth clock, as from the
// serial-to-parallel converter, and done must come on the 13th enabled
// cycle after start (12 CORDIC iterations plus the final scaling).
module tb_cfo_estimator;
  import sync_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, ce = 0, start = 0;
  ac_result_t ac_in = '0;
  logic done;
  logic signed [ANGLE_W-1:0] angle;
  logic signed [PHASE_W-1:0] phase_inc;
  cfo_estimator dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    ce = (cyc % 4 == 0);
  end

  task automatic one(input int re, input int im);
    real  a_ref, inc_ref;
    int   d, n_ce;
    @(negedge clk);
    #0.1;
    ac_in.re = AC_W'(re); ac_in.im = AC_W'(im);
    start = 1;
    @(negedge clk);
    #0.1;
    start = 0;
    n_ce = int'(ce);    // enabled cycles from here on, including this one
    while (!done) begin
      @(negedge clk);
      #0.1;
      if (!done) n_ce += int'(ce);
    end
    a_ref   = $atan2(real'(im), real'(re)) / (2.0 * PI) * 65536.0;
    inc_ref = a_ref * 256.0 / 165.0;
    d = int'(angle) - int'(a_ref);
    if (d > 32768) d -= 65536;
    if (d < -32768) d += 65536;
    chk(d <= 20 && d >= -20, $sformatf("(%0d,%0d): angle %0d expected %0.1f", re, im, angle, a_ref));
    // increment; on the negative real axis +pi and -pi are equally right
    d = int'(phase_inc) - int'(inc_ref);
    if (im == 0 && re < 0) d = (phase_inc < 0 ? -int'(phase_inc) : int'(phase_inc)) - int'(inc_ref < 0.0 ? -inc_ref : inc_ref);
    chk(d <= 32 && d >= -32, $sformatf("(%0d,%0d): inc %0d expected %0.1f", re, im, phase_inc, inc_ref));
    chk(n_ce == 13, $sformatf("latency %0d enabled cycles", n_ce));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(100, 0); one(0, 100); one(-100, 0); one(0, -100); one(-90, 5); one(-90, -5);
    for (int k = 0; k < 300; k++) begin
      real th, r;
      th = real'($urandom_range(65535, 0)) / 65536.0 * 2.0 * PI;
      r  = 10.0 + real'($urandom_range(117, 0));
      one(int'(r * $cos(th)), int'(r * $sin(th)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
