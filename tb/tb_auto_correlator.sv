// Unit test of auto_correlator: random 4-bit complex samples are fed as
// symbols of NSEL samples (cur) together with a random "previous symbol"
// sample (prev), with random idle cycles. A reference computes
// sum prev*conj(cur) and sum |cur|^2 in integers, then divides by 2^4 with
// rounding to nearest and saturates (ac to +/-127, power to 255). Also
// checks that a result appears exactly one cycle after the last sample.
module tb_auto_correlator;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, in_last = 0;
  part_sample_t cur = '0, prev = '0;
  logic res_valid;
  ac_result_t ac_out;
  logic [7:0] p_out;
  auto_correlator dut (.*);
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

  function automatic int rnd_div(input int v);   // round(v / 16), ties up
    return (v + 8) >>> 4;
  endfunction
  function automatic int sat(input int v, input int lo, input int hi);
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      int sr, si, sp, amp;
      sr = 0; si = 0; sp = 0;
      amp = (s % 3 == 0) ? 8 : ((s % 3 == 1) ? 3 : 1);   // large, mid, small levels
      for (int n = 0; n < NSEL; n++) begin
        int cr, ci, pr, pi;
        if (s % 5 == 4) begin   // correlated symbol: prev = cur
          cr = int'($urandom_range(2 * amp - 1, 0)) - amp; ci = int'($urandom_range(2 * amp - 1, 0)) - amp;
          pr = cr; pi = ci;
        end else begin
          cr = int'($urandom_range(2 * amp - 1, 0)) - amp; ci = int'($urandom_range(2 * amp - 1, 0)) - amp;
          pr = int'($urandom_range(2 * amp - 1, 0)) - amp; pi = int'($urandom_range(2 * amp - 1, 0)) - amp;
        end
        sr += pr * cr + pi * ci;
        si += pi * cr - pr * ci;
        sp += cr * cr + ci * ci;
        @(negedge clk);
        cur.re = PART_W'(cr); cur.im = PART_W'(ci);
        prev.re = PART_W'(pr); prev.im = PART_W'(pi);
        in_valid = 1; in_first = (n == 0); in_last = (n == NSEL - 1);
        @(negedge clk);
        in_valid = 0; in_first = 0; in_last = 0;
        if (n == NSEL - 1) begin
          // res_valid was registered at the rising edge just passed
          chk(res_valid, "result one cycle after the last sample");
          chk(int'(ac_out.re) == sat(rnd_div(sr), -127, 127) && int'(ac_out.im) == sat(rnd_div(si), -127, 127),
              $sformatf("symbol %0d: ac %0d,%0d expected %0d,%0d", s, ac_out.re, ac_out.im,
                        sat(rnd_div(sr), -127, 127), sat(rnd_div(si), -127, 127)));
          chk(int'(p_out) == sat((sp + 8) >> 4, 0, 255), $sformatf("symbol %0d: p %0d expected %0d", s, p_out, sat((sp + 8) >> 4, 0, 255)));
        end else begin
          chk(!res_valid, "no result mid-symbol");
        end
        if ($urandom_range(3, 0) == 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
