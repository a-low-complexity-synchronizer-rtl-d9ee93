// End-to-end test of the synchronizer at its default size (N = 165,
// OMEGA = 4, four lanes).
//
// Builds four preamble-bearing packets in the testbench: a lead-in of
// noise with random length, 21 packet-sequence symbols (random +/-1
// pattern of 165 samples, which is also given to the matched filter as
// its coefficients), 3 sign-inverted frame-sequence symbols, 6 channel-
// estimation symbols and some data, then noise. Each packet gets its own
// carrier-frequency offset, applied as a real-valued phase ramp, and
// either a single path or two paths where the later path is the stronger
// (delay 3 and 2 samples, gain 1.1).
// Samples are rounded to 5 bits with small uniform noise. sync_en is
// dropped between packets, which restarts the synchronizer.
//
// Checked independently of the design's arithmetic: no packet detection
// before the preamble; the CFO increment against the applied offset
// (within 0.1 rad per symbol: the estimate comes from a single 41-sample
// correlation of coarsely quantized samples); every symbol-start mark on
// the FFT output against the true symbol grid of the first path (for
// two-path packets the second path's grid is also accepted: with the
// 4-bit correlator inputs the first path's peak occasionally falls below
// half of the second's, and the detector then rightly ignores it); the
// PS/FS decision falling at the end of the first frame-sequence symbol.
// Mechanisms counted, each must occur: packet detection, CFO load, a
// window search where the earliest peak is not the strongest (two
// two-path packets make this all but certain), framing
// realignment, skipped AC results, PS/FS detection, restart.
module tb_uwb_sync_top;
  import sync_pkg::*;

  localparam int NPKT = 4;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sync_en = 1'b0;
  logic adc_valid = 1'b0;
  adc_sample_t adc_sample = '0;
  logic [N-1:0] coef_neg;
  logic [7:0] lambda1 = 8'd128;   // 0.5
  logic [7:0] eps     = 8'd64;    // 0.25

  logic fft_valid;
  comp_sample_t fft_vec [LANES];
  logic [LANES-1:0] fft_sym_start;
  logic pd_found, fwd_found, sync_done, ptd_pulse;
  logic signed [PHASE_W-1:0] cfo_phase_inc;
  logic [$clog2(N)-1:0] fw_k;
  sync_state_t state;

  uwb_sync_top dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_pd = 0, n_cfo_load = 0, n_fw_earliest = 0, n_realign = 0, n_skip = 0, n_ptd = 0, n_restart = 0;
  int n_sym_marks = 0;

  // current packet reference (absolute sample index of PS0 start)
  longint pre_start = -1;
  longint in_idx = 0;        // ADC samples sent
  longint vec_idx = 0;       // FFT output vectors seen
  real    omega = 0.0;
  int     cur_d1 = 0;
  bit     pd_seen = 0, ptd_seen = 0;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output-side monitors
  always @(posedge clk) if (rst_n) begin
    if (fft_valid) begin
      for (int i = 0; i < LANES; i++) if (fft_sym_start[i]) begin
        longint a;
        a = vec_idx * LANES + i;
        n_sym_marks++;
        check(pre_start >= 0 && (((a - pre_start) % N) == 0 || (cur_d1 > 0 && ((a - pre_start - cur_d1) % N) == 0)),
              $sformatf("symbol mark at sample %0d, preamble starts at %0d", a, pre_start));
      end
      vec_idx++;
    end
    if (ptd_pulse) begin
      longint last, lo, hi;
      last = vec_idx * LANES - 1;
      lo = pre_start + 21 * N + 156;
      hi = pre_start + 21 * N + 172;
      n_ptd++;
      ptd_seen = 1;
      check(last >= lo && last <= hi, $sformatf("PS/FS decision at sample %0d, expected %0d..%0d", last, lo, hi));
    end
    if (dut.pd_detect || dut.cfo_done || dut.fw_done || dut.realign || ptd_pulse)
      $display("  %s at preamble sample %0d (symbol %0.2f)",
               dut.pd_detect ? "packet detected" : dut.cfo_done ? "CFO estimated" : dut.fw_done ? "window found" :
               dut.realign ? "framing realigned" : "PS/FS boundary", in_idx - pre_start, real'(in_idx - pre_start) / N);
    if (dut.pd_detect) begin
      n_pd++;
      pd_seen = 1;
      check(pre_start >= 0 && in_idx > pre_start, $sformatf("packet detected at sample %0d before preamble %0d", in_idx, pre_start));
    end
    if (dut.cfo_done) begin
      longint expect_inc, err;
      n_cfo_load++;
      expect_inc = longint'(-omega / (2.0 * PI) * (2.0 ** PHASE_W));
      err = longint'(dut.cfo_phase_inc) - expect_inc;
      if (err < 0) err = -err;
      // 0.1 rad per symbol = 0.1 / (2*pi*N) * 2^PHASE_W = 1618
      check(err <= 1618,
            $sformatf("CFO increment %0d, expected about %0d", dut.cfo_phase_inc, expect_inc));
    end
    if (dut.fw_done) begin
      if (dut.fw_k != dut.peak_k[0]) n_fw_earliest++;
      $display("window search: k=%0d peaks %0d (%0d) %0d (%0d)", dut.fw_k, dut.peak_k[0], dut.peak_pow[0], dut.peak_k[1], dut.peak_pow[1]);
    end
    if (dut.realign) n_realign++;
    if (dut.ac_valid && dut.state == ST_PTD && !dut.ptd_valid) n_skip++;
  end

  // stimulus
  real sym_re [N];
  int  tx_len;
  real tx_re [], tx_im [];

  function automatic int q5(input real v);
    int r;
    r = int'(v);
    if (r > 15) r = 15;
    if (r < -16) r = -16;
    return r;
  endfunction

  function automatic int noise(input int amp);
    return int'($urandom_range(2 * amp, 0)) - amp;
  endfunction

  task automatic send(input int re, input int im);
    adc_sample.re <= ADC_W'(re);
    adc_sample.im <= ADC_W'(im);
    adc_valid     <= 1'b1;
    @(posedge clk);
    in_idx++;
  endtask

  task automatic run_packet(input int p, input real amp, input real g1, input int d1, input real om);
    int lead;
    lead = 500 + int'($urandom_range(N - 1, 0));
    // transmitted baseband: PS x21, FS x3 (inverted), CES x6, data
    tx_len = 30 * N + 300;
    tx_re = new[tx_len];
    tx_im = new[tx_len];
    for (int s = 0; s < 30; s++)
      for (int n = 0; n < N; n++) begin
        if (s < 21)      begin tx_re[s*N+n] =  amp * sym_re[n]; tx_im[s*N+n] = 0.0; end
        else if (s < 24) begin tx_re[s*N+n] = -amp * sym_re[n]; tx_im[s*N+n] = 0.0; end
        else begin
          tx_re[s*N+n] = ($urandom_range(1, 0) != 0) ? amp * 0.7 : -amp * 0.7;
          tx_im[s*N+n] = ($urandom_range(1, 0) != 0) ? amp * 0.7 : -amp * 0.7;
        end
      end
    for (int n = 30 * N; n < tx_len; n++) begin
      tx_re[n] = ($urandom_range(1, 0) != 0) ? amp * 0.7 : -amp * 0.7;
      tx_im[n] = ($urandom_range(1, 0) != 0) ? amp * 0.7 : -amp * 0.7;
    end
    omega   = om;
    cur_d1  = (g1 != 0.0) ? d1 : 0;
    pd_seen = 0;
    ptd_seen = 0;
    pre_start = in_idx + lead;
    $display("packet %0d: preamble at sample %0d, echo gain %0.2f, CFO %0.5f rad/sample", p, pre_start, g1, om);
    // lead-in noise
    sync_en <= 1'b1;
    for (int n = 0; n < lead; n++) send(noise(3), noise(3));
    // channel, CFO, noise, quantization
    for (int n = 0; n < tx_len; n++) begin
      real yr, yi, ph, c, s;
      yr = tx_re[n];
      yi = tx_im[n];
      if (n >= d1 && g1 != 0.0) begin
        yr += g1 * tx_re[n-d1];
        yi += g1 * tx_im[n-d1];
      end
      ph = om * real'(in_idx);
      c = $cos(ph);
      s = $sin(ph);
      send(q5(yr * c - yi * s + real'(noise(1))), q5(yr * s + yi * c + real'(noise(1))));
    end
    check(pd_seen, $sformatf("packet %0d detected", p));
    check(ptd_seen, $sformatf("packet %0d PS/FS boundary found", p));
    check(sync_done, $sformatf("packet %0d synchronizer reached done", p));
    // drop sync_en: restart for the next packet
    sync_en <= 1'b0;
    for (int n = 0; n < 40; n++) send(noise(3), noise(3));
    n_restart++;
    pre_start = -1;
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      coef_neg[n] = $urandom_range(1, 0) != 0;
      sym_re[n]   = coef_neg[n] ? -1.0 : 1.0;
    end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    run_packet(0, 9.0, 0.0, 0, 0.30 / N);
    run_packet(1, 7.0, 1.1, 3, -0.45 / N);
    run_packet(2, 8.0, 0.0, 0, 0.80 / N);
    run_packet(3, 7.0, 1.1, 2, 0.55 / N);
    // every mechanism must have occurred
    check(n_pd >= NPKT,          $sformatf("packet detections: %0d", n_pd));
    check(n_cfo_load >= NPKT,    $sformatf("CFO loads: %0d", n_cfo_load));
    check(n_fw_earliest >= 1,    $sformatf("earliest-not-strongest window searches: %0d", n_fw_earliest));
    check(n_realign >= NPKT,     $sformatf("realignments: %0d", n_realign));
    check(n_skip >= 2 * NPKT,    $sformatf("skipped AC results: %0d", n_skip));
    check(n_ptd == NPKT,         $sformatf("PS/FS detections: %0d", n_ptd));
    check(n_restart >= 2,        $sformatf("restarts: %0d", n_restart));
    check(n_sym_marks > 20,      $sformatf("symbol marks: %0d", n_sym_marks));
    $display("mechanisms: pd=%0d cfo=%0d fw_earliest=%0d realign=%0d skip=%0d ptd=%0d restart=%0d marks=%0d",
             n_pd, n_cfo_load, n_fw_earliest, n_realign, n_skip, n_ptd, n_restart, n_sym_marks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
