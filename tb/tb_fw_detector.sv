// Unit test of fw_detector. MF outputs are presented as the matched
// filter delivers them (four timings per step, 42 steps, last lanes
// invalid), with real-only values so that the power is re^2.
// Directed profiles check the search rule: a single dominant peak wins
// over a weak earlier sidelobe; a somewhat weaker peak 3 timings before
// the strongest wins; earliest is judged on the circle (k = 160 is before
// k = 2); peaks more than N/2 apart wrap; an earlier peak counts only up
// to GI = 37 timings ahead of the strongest (checked at 37 and 38).
// Random profiles are checked against a plain reference model of the same
// rule: local maxima (P(k) > P(k-1), P(k) >= P(k+1), zero outside the
// sweep), the two strongest of them (ties to the earlier), then the one of
// those within half the strongest power and at most GI ahead of it that
// lies earliest relative to the strongest.
module tb_fw_detector;
  import sync_pkg::*;
  localparam int KW = $clog2(N);
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_last = 0;
  logic [KW-1:0] in_k = '0;
  logic [LANES-1:0] in_lane_ok = '0;
  logic signed [10:0] in_re [LANES];
  logic signed [10:0] in_im [LANES];
  logic done;
  logic [KW-1:0] k_fw;
  logic [KW-1:0] peak_k [2];
  logic [21:0] peak_pow [2];
  fw_detector dut (.*);
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

  int prof [N];
  bit got_done;
  always @(posedge clk) if (done) got_done <= 1;

  function automatic int model();
    int pw [N];
    int b0, b1, p0, p1, off;
    b0 = -1; b1 = -1; p0 = -1; p1 = -1;
    for (int k = 0; k < N; k++) pw[k] = prof[k] * prof[k];
    for (int k = 0; k < N; k++) begin
      int l, r;
      l = (k == 0) ? 0 : pw[k-1];
      r = (k == N - 1) ? 0 : pw[k+1];
      if (pw[k] > l && pw[k] >= r) begin
        if (pw[k] > p0) begin p1 = p0; b1 = b0; p0 = pw[k]; b0 = k; end
        else if (pw[k] > p1) begin p1 = pw[k]; b1 = k; end
      end
    end
    if (b1 < 0 || 2 * p1 < p0) return b0;
    off = b1 - b0;
    if (off > N / 2) off -= N;
    if (off <= -(N + 1) / 2) off += N;
    return (off < 0 && off >= -GI) ? b1 : b0;
  endfunction

  task automatic sweep(input int expect_k, input string what);
    @(negedge clk);
    got_done = 0;
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int s = 0; s < (N + LANES - 1) / LANES; s++) begin
      @(negedge clk);
      in_k = KW'(s * LANES);
      for (int j = 0; j < LANES; j++) begin
        in_lane_ok[j] = (s * LANES + j) < N;
        in_re[j] = in_lane_ok[j] ? 11'(prof[s * LANES + j]) : 11'sd0;
        in_im[j] = '0;
      end
      in_valid = 1;
      in_last  = (s == (N + LANES - 1) / LANES - 1);
      @(negedge clk);
      in_valid = 0;
      in_last  = 0;
      repeat (2) @(negedge clk);   // steps arrive every 4 clocks
    end
    while (!got_done) @(negedge clk);
    chk(int'(k_fw) == expect_k, $sformatf("%s: k_fw %0d expected %0d (peaks %0d,%0d)", what, k_fw, expect_k, peak_k[0], peak_k[1]));
  endtask

  task automatic noise_floor();
    for (int k = 0; k < N; k++) prof[k] = int'($urandom_range(40, 0)) - 20;
  endtask

  initial begin
    for (int j = 0; j < LANES; j++) begin in_re[j] = '0; in_im[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    noise_floor(); prof[50] = 300; prof[40] = 100;               sweep(50, "dominant peak, weak earlier sidelobe");
    noise_floor(); prof[50] = 300; prof[47] = 250;               sweep(47, "weaker earlier path");
    noise_floor(); prof[2] = 300;  prof[160] = 280;              sweep(160, "earliest across the wrap");
    noise_floor(); prof[10] = 300; prof[140] = 290;              sweep(140, "peaks more than N/2 apart");
    noise_floor(); prof[10] = 300; prof[100] = 290;              sweep(10, "earlier peak beyond the guard interval");
    noise_floor(); prof[80] = 300; prof[43] = 290;               sweep(43, "earlier peak exactly one guard interval ahead");
    noise_floor(); prof[80] = 300; prof[42] = 290;               sweep(80, "earlier peak one beyond the guard interval");
    noise_floor(); prof[0] = 300;  prof[164] = 20;               sweep(0, "peak at k = 0");
    noise_floor(); prof[164] = -300;                             sweep(164, "peak at k = N-1");
    for (int r = 0; r < 200; r++) begin
      noise_floor();
      for (int q = 0; q < 3; q++) prof[$urandom_range(N - 1, 0)] = int'($urandom_range(600, 0)) - 300;
      sweep(model(), $sformatf("random profile %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
