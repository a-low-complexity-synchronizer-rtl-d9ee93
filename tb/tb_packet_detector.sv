// Unit test of packet_detector: random AC results, powers and thresholds;
// the expected decision is evaluated in real arithmetic as
// |A|^2 / P^2 >= lambda1/256 with P > 0, and compared with detect one
// cycle later. Includes equality cases and the all-zero input.
module tb_packet_detector;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  ac_result_t ac_in = '0;
  logic [7:0] p_in = '0, lambda1 = '0;
  logic ratio_ok, detect;
  packet_detector dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0, n_det = 0;
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

  task automatic one(input int ar, input int ai, input int p, input int l);
    bit exp;
    real ratio;
    @(negedge clk);
    ac_in.re = AC_W'(ar); ac_in.im = AC_W'(ai); p_in = 8'(p); lambda1 = 8'(l);
    in_valid = 1;
    ratio = (p == 0) ? 0.0 : real'(ar * ar + ai * ai) / real'(p * p);
    exp = (p != 0) && (ratio >= real'(l) / 256.0);
    @(negedge clk);
    in_valid = 0;
    chk(detect == exp, $sformatf("A=%0d,%0d P=%0d l1=%0d: detect %0d expected %0d", ar, ai, p, l, detect, exp));
    n_det += int'(exp);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0, 0, 0, 0);          // silence never detects
    one(16, 0, 32, 64);       // ratio exactly 0.25
    one(15, 0, 32, 64);       // just below
    one(-40, 30, 50, 255);    // ratio 1.0 against 255/256
    for (int k = 0; k < 3000; k++) begin
      int p;
      p = int'($urandom_range(255, 0));
      one(int'($urandom_range(254, 0)) - 127, int'($urandom_range(254, 0)) - 127, p, int'($urandom_range(255, 0)));
    end
    // held input without in_valid must not detect
    @(negedge clk);
    ac_in.re = 8'sd100; p_in = 8'd1; lambda1 = 8'd1;
    @(negedge clk);
    chk(!detect, "no detect without in_valid");
    chk(n_det > 100, "detections happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
