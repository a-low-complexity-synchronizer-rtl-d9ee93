// Unit test of pt_detector. Scenario runs: a sequence of AC results as a
// preamble produces them (A = P * exp(j*theta) plus noise while both
// correlated symbols are packet-sequence symbols, A = -P * exp(j*theta) for
// the pair that straddles the PS/FS boundary, +P again inside the frame
// sequence), at several levels; detect must fire exactly on the result of
// the straddling pair and nowhere before (later results are ignored, as
// the sequencer stops at the first detection). Random runs compare every
// decision with the threshold rule evaluated in real arithmetic:
//   |S(m)|^2 / Q(m)^2 <= (eps/256) * |S(m-1)|^2 / Q(m-1)^2,
// S(m) = A(m) + A(m-1), Q(m) = P(m) + P(m-1), from the fourth result on.
module tb_pt_detector;
  import sync_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  ac_result_t ac_in = '0;
  logic [7:0] p_in = '0, eps = 8'd64;
  logic detect;
  pt_detector dut (.*);
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

  task automatic push(input int ar, input int ai, input int p, output bit det);
    @(negedge clk);
    ac_in.re = AC_W'(ar); ac_in.im = AC_W'(ai); p_in = 8'(p);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    det = detect;
    repeat ($urandom_range(3, 0)) @(negedge clk);
  endtask

  task automatic do_clear();
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
  endtask

  function automatic int nz(input int a);
    return int'($urandom_range(2 * a, 0)) - a;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // preamble scenarios
    for (int sc = 0; sc < 30; sc++) begin
      int   lvl, n_ps, idx_boundary;
      real  th;
      bit   det;
      lvl = 20 + int'($urandom_range(80, 0));
      th  = real'($urandom_range(359, 0)) * PI / 180.0;
      n_ps = 6 + int'($urandom_range(6, 0));
      eps = 8'd64;
      do_clear();
      for (int m = 0; m < n_ps + 3; m++) begin
        int sgn, ar, ai, p;
        sgn = (m == n_ps) ? -1 : 1;
        p   = lvl + nz(2);
        ar  = int'(sgn * lvl * $cos(th)) + nz(2);
        ai  = int'(sgn * lvl * $sin(th)) + nz(2);
        push(ar, ai, p, det);
        // after the boundary the sequencer stops listening; only check up to it
        if (m <= n_ps) chk(det == (m == n_ps), $sformatf("scenario %0d result %0d: detect %0d (boundary at %0d)", sc, m, det, n_ps));
      end
    end
    // random decisions against the real-valued equations
    for (int r = 0; r < 40; r++) begin
      int a_re [4], a_im [4], pp [4], cnt;
      eps = 8'($urandom_range(255, 1));
      do_clear();
      cnt = 0;
      for (int m = 0; m < 30; m++) begin
        int ar, ai, p;
        bit det, exp;
        ar = int'($urandom_range(254, 0)) - 127;
        ai = int'($urandom_range(254, 0)) - 127;
        p  = int'($urandom_range(255, 1));
        // history: index 0 = newest
        for (int h = 3; h > 0; h--) begin a_re[h] = a_re[h-1]; a_im[h] = a_im[h-1]; pp[h] = pp[h-1]; end
        a_re[0] = ar; a_im[0] = ai; pp[0] = p;   // pp[0] is P(m+1)
        cnt++;
        exp = 0;
        if (cnt >= 4) begin
          real s2, q, s2p, qp;
          s2  = real'((a_re[0] + a_re[1]) ** 2 + (a_im[0] + a_im[1]) ** 2);
          q   = real'(pp[1] + pp[2]);
          s2p = real'((a_re[1] + a_re[2]) ** 2 + (a_im[1] + a_im[2]) ** 2);
          qp  = real'(pp[2] + pp[3]);
          exp = s2 * qp * qp <= (real'(eps) / 256.0) * s2p * q * q;
        end
        push(ar, ai, p, det);
        chk(det == exp, $sformatf("random run %0d result %0d: detect %0d expected %0d", r, m, det, exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
