// Unit test of matched_filter: random stored samples and random
// coefficient signs; every one of the N outputs is compared with
// M(k) = sum_l taps[l] * C((4*l - k) mod N), computed directly in the
// testbench. ce pulses every fourth clock; a sweep must deliver exactly
// ceil(N/4) = 42 steps, one per enabled cycle, with out_last on the final
// one and lanes beyond k = N-1 marked invalid.
module tb_matched_filter;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, start = 0;
  logic [N-1:0] coef_neg;
  part_sample_t taps [NSEL];
  logic out_valid, out_last;
  logic [$clog2(N)-1:0] out_k;
  logic [LANES-1:0] out_lane_ok;
  logic signed [10:0] out_re [LANES];
  logic signed [10:0] out_im [LANES];
  matched_filter dut (.*);
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

  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    ce = (cyc % 4 == 0);
  end

  int steps, seen_k;
  always @(posedge clk) if (rst_n && out_valid) begin
    chk(out_k == $clog2(N)'(steps * LANES), $sformatf("step %0d k %0d", steps, out_k));
    chk(out_last == (steps == (N + LANES - 1) / LANES - 1), $sformatf("out_last at step %0d", steps));
    for (int j = 0; j < LANES; j++) begin
      int k, er, ei;
      k = steps * LANES + j;
      chk(out_lane_ok[j] == (k < N), $sformatf("lane_ok k=%0d", k));
      if (k < N) begin
        er = 0; ei = 0;
        for (int l = 0; l < NSEL; l++) begin
          int idx;
          idx = ((OMEGA * l - k) % N + N) % N;
          er += coef_neg[idx] ? -int'(taps[l].re) : int'(taps[l].re);
          ei += coef_neg[idx] ? -int'(taps[l].im) : int'(taps[l].im);
        end
        chk(int'(out_re[j]) == er && int'(out_im[j]) == ei,
            $sformatf("k=%0d: %0d,%0d expected %0d,%0d", k, out_re[j], out_im[j], er, ei));
        seen_k++;
      end
    end
    steps++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int t0, t1;
      @(negedge clk);
      for (int n = 0; n < N; n++) coef_neg[n] = $urandom_range(1, 0) != 0;
      for (int l = 0; l < NSEL; l++) taps[l] = part_sample_t'($urandom);
      if (run == 3) for (int l = 0; l < NSEL; l++) taps[l] = '{re: -4'sd8, im: 4'sd7};   // full scale
      steps = 0; seen_k = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = cyc;
      while (!(out_valid && out_last)) @(negedge clk);
      t1 = cyc;
      repeat (8) @(negedge clk);
      chk(steps == (N + LANES - 1) / LANES, $sformatf("steps %0d", steps));
      chk(seen_k == N, $sformatf("timings %0d", seen_k));
      // 42 enabled cycles at one per 4 clocks
      chk(t1 - t0 <= 4 * steps + 4 && t1 - t0 >= 4 * steps - 4, $sformatf("sweep took %0d clocks", t1 - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
