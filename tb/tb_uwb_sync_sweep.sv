// Operating-condition sweep of the synchronizer at its default size.
//
// Sends NPKT packets (noise lead-in of random length, 21 packet-sequence
// symbols, 3 inverted frame-sequence symbols, 6 channel-estimation
// symbols, data) under the conditions a UWB receiver has to cope with:
//   * carrier-frequency offset drawn uniformly from +/-0.81 rad per
//     symbol (40 ppm of a 10.3 GHz carrier over 165 samples at
//     528 MS/s), with the two extremes included;
//   * either a single path or a multipath channel of 12 complex Gaussian
//     taps with an exponential power profile of 5 ns RMS delay spread
//     (2.64 samples), normalised to unit average power;
//   * complex Gaussian noise at SNR 4, 8, 12 and 20 dB (per sample,
//     signal power after the channel), signal RMS about 6 LSB per
//     component, rounded and clipped to the 5-bit input. Before the
//     packet the noise is held at least at half the signal RMS, as an
//     AGC that has adjusted its gain to the noise floor would deliver it
//     (a noise floor far below 1 LSB turns into a DC offset after the
//     4-MSB truncation of the correlator inputs, which correlates like a
//     repeated signal).
// Between packets sync_en is dropped, which restarts the synchronizer.
//
// A packet counts as locked when it is detected after its preamble
// started, the CFO increment is within 0.15 rad per symbol of the
// applied offset (a single 41-sample estimate has a standard deviation of
// about 0.03 rad at 12 dB), every symbol mark lies within -24..+8 samples
// of the first path's symbol grid, and the PS/FS decision comes at the end
// of the first frame-sequence symbol (in the framing the marks give). The
// window range: an FFT window that starts early by up to GI minus the
// channel length (37 - 12 - 1) still sees no inter-symbol interference,
// and beyond 8 samples late the channel taps hold under 5% of the power.
// Checks: no packet detection before any preamble; every single-path
// packet at 12 dB and above locks (at 8 dB the CFO limit is only about
// 2.4 standard deviations of the estimate, so a rare miss is expected
// there); at least 75% of all packets lock. In
// multipath a correlation sidelobe of the 41-tap filter can exceed the
// spread-out main peak, so single multipath packets may fail at any SNR.
// Lock counts per SNR are printed.
module tb_uwb_sync_sweep;
  import sync_pkg::*;

  localparam int NPKT = 24;
  localparam int NTAP = 12;
  localparam real PI = 3.14159265358979323846;
  localparam real SIG_RMS = 6.0;

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

  // watchdog: 24 packets of about 5700 samples each
  initial begin
    repeat (NPKT * 7000 + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-packet observation
  longint pre_start = -1;
  longint in_idx = 0;
  longint vec_idx = 0;
  real    omega = 0.0;
  bit     pd_ok, pd_early, cfo_ok, marks_ok, ptd_ok;
  int     n_marks, mark_off;
  real    cfo_err = 0.0;

  function automatic int wrap_off(input longint d);
    int r;
    r = int'(d % N);
    if (r < 0) r += N;
    if (r > N / 2) r -= N;
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (fft_valid) begin
      for (int i = 0; i < LANES; i++) if (fft_sym_start[i]) begin
        int d;
        d = wrap_off(vec_idx * LANES + i - pre_start);
        if (n_marks == 0) mark_off = d;
        n_marks++;
        if (pre_start < 0 || d < -(GI - NTAP - 1) || d > 8) marks_ok = 0;
      end
      vec_idx++;
    end
    if (dut.pd_detect) begin
      if (pre_start >= 0 && in_idx > pre_start) pd_ok = 1;
      else pd_early = 1;
    end
    if (dut.cfo_done) begin
      real expect_inc, err;
      expect_inc = -omega / (2.0 * PI) * (2.0 ** PHASE_W);
      err = real'(dut.cfo_phase_inc) - expect_inc;
      if (err < 0) err = -err;
      cfo_err = err / (2.0 ** PHASE_W) * 2.0 * PI * N;
      cfo_ok = (cfo_err <= 0.15);
    end
    if (ptd_pulse) begin
      longint last, target;
      last = vec_idx * LANES - 1;
      target = pre_start + 22 * N - 1 + mark_off;
      ptd_ok = (n_marks > 0) && (last >= target - 8) && (last <= target + 8);
    end
  end

  // stimulus helpers
  real sym_re [N];
  real tx_re [], tx_im [];
  real h_re [NTAP], h_im [NTAP];

  function automatic real urand();
    return (real'($urandom) + 0.5) / 4294967296.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand())) * $cos(2.0 * PI * urand());
  endfunction

  function automatic int q5(input real v);
    int r;
    r = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (r > 15) r = 15;
    if (r < -16) r = -16;
    return r;
  endfunction

  task automatic send(input int re, input int im);
    adc_sample.re <= ADC_W'(re);
    adc_sample.im <= ADC_W'(im);
    adc_valid     <= 1'b1;
    @(posedge clk);
    in_idx++;
  endtask

  // channel: single path, or exponential profile with 2.64-sample RMS
  // delay spread (mean excess delay equal to the RMS spread)
  task automatic make_channel(input bit multipath);
    real tot, pw;
    for (int t = 0; t < NTAP; t++) begin h_re[t] = 0.0; h_im[t] = 0.0; end
    if (!multipath) begin
      h_re[0] = 1.0;
      return;
    end
    tot = 0.0;
    for (int t = 0; t < NTAP; t++) begin
      pw = $exp(-real'(t) / 2.64);
      h_re[t] = gauss() * $sqrt(pw / 2.0);
      h_im[t] = gauss() * $sqrt(pw / 2.0);
      tot += h_re[t] * h_re[t] + h_im[t] * h_im[t];
    end
    for (int t = 0; t < NTAP; t++) begin
      h_re[t] = h_re[t] / $sqrt(tot);
      h_im[t] = h_im[t] / $sqrt(tot);
    end
  endtask

  int lock_cnt [4];
  int pkt_cnt [4];
  int snr_db [4] = '{4, 8, 12, 20};
  int total_lock = 0;

  task automatic run_packet(input int p, input int si, input bit multipath, input real om_sym);
    int lead, tx_len;
    real sig, nsd, nfl;
    bit locked;
    lead = 500 + int'($urandom_range(N - 1, 0));
    tx_len = 30 * N + 300;
    tx_re = new[tx_len];
    tx_im = new[tx_len];
    for (int s = 0; s < 30; s++)
      for (int n = 0; n < N; n++) begin
        if (s < 21)      begin tx_re[s*N+n] =  sym_re[n]; tx_im[s*N+n] = 0.0; end
        else if (s < 24) begin tx_re[s*N+n] = -sym_re[n]; tx_im[s*N+n] = 0.0; end
        else begin
          tx_re[s*N+n] = ($urandom_range(1, 0) != 0) ? 0.7071 : -0.7071;
          tx_im[s*N+n] = ($urandom_range(1, 0) != 0) ? 0.7071 : -0.7071;
        end
      end
    for (int n = 30 * N; n < tx_len; n++) begin
      tx_re[n] = ($urandom_range(1, 0) != 0) ? 0.7071 : -0.7071;
      tx_im[n] = ($urandom_range(1, 0) != 0) ? 0.7071 : -0.7071;
    end
    make_channel(multipath);
    // the real preamble has power 1 per sample; scale so that the complex
    // received signal has SIG_RMS per component
    sig = SIG_RMS * $sqrt(2.0);
    nsd = SIG_RMS / $sqrt($pow(10.0, real'(snr_db[si]) / 10.0));
    nfl = (nsd > SIG_RMS / 2.0) ? nsd : SIG_RMS / 2.0;
    omega = om_sym / N;
    pd_ok = 0; pd_early = 0; cfo_ok = 0; marks_ok = 1; ptd_ok = 0; n_marks = 0; mark_off = 0;
    pre_start = -1;
    sync_en <= 1'b1;
    for (int n = 0; n < lead; n++) send(q5(nfl * gauss()), q5(nfl * gauss()));
    pre_start = in_idx;
    for (int n = 0; n < tx_len; n++) begin
      real yr, yi, ph, c, s;
      yr = 0.0;
      yi = 0.0;
      for (int t = 0; t < NTAP; t++) if (n >= t) begin
        yr += h_re[t] * tx_re[n-t] - h_im[t] * tx_im[n-t];
        yi += h_re[t] * tx_im[n-t] + h_im[t] * tx_re[n-t];
      end
      ph = omega * real'(in_idx);
      c = $cos(ph);
      s = $sin(ph);
      send(q5(sig * (yr * c - yi * s) + nsd * gauss()), q5(sig * (yr * s + yi * c) + nsd * gauss()));
    end
    locked = pd_ok && !pd_early && cfo_ok && marks_ok && (n_marks > 0) && ptd_ok;
    pkt_cnt[si]++;
    if (locked) begin lock_cnt[si]++; total_lock++; end
    $display("packet %2d: SNR %2d dB, %s, CFO %6.3f rad/symbol: %s (pd %0d cfo error %5.3f window %0d marks %0d ptd %0d)",
             p, snr_db[si], multipath ? "multipath  " : "single path", om_sym,
             locked ? "locked" : "NOT locked", pd_ok, cfo_err, mark_off, marks_ok && n_marks > 0, ptd_ok);
    check(!pd_early, $sformatf("packet %0d: detection before the preamble", p));
    if (!multipath && snr_db[si] >= 12)
      check(locked, $sformatf("single-path packet %0d at %0d dB did not lock", p, snr_db[si]));
    sync_en <= 1'b0;
    pre_start = -1;
    for (int n = 0; n < 40; n++) send(q5(nfl * gauss()), q5(nfl * gauss()));
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      coef_neg[n] = $urandom_range(1, 0) != 0;
      sym_re[n]   = coef_neg[n] ? -1.0 : 1.0;
    end
    for (int i = 0; i < 4; i++) begin lock_cnt[i] = 0; pkt_cnt[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < NPKT; p++) begin
      real om;
      if (p == 0) om = 0.81;
      else if (p == 1) om = -0.81;
      else om = (urand() * 2.0 - 1.0) * 0.81;
      run_packet(p, p % 4, (p / 4) % 2 == 1 || p >= 16, om);
    end
    for (int i = 0; i < 4; i++)
      $display("SNR %2d dB: %0d of %0d packets locked", snr_db[i], lock_cnt[i], pkt_cnt[i]);
    check(total_lock * 4 >= NPKT * 3, $sformatf("%0d of %0d packets locked", total_lock, NPKT));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
