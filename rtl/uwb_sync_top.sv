// Low-complexity timing and frequency synchronizer for an OFDM UWB receiver.
//
// Takes the 5-bit I/Q ADC stream and, during the packet preamble, detects
// the packet, estimates and removes the carrier-frequency offset, finds the
// FFT-window boundary and the boundary between the packet and frame
// sequences. The compensated 6-bit samples go on to the FFT with the
// symbol boundaries marked.
//
// Data path: a serial-to-parallel converter makes 4-lane vectors (one per
// 132 MHz cycle at 528 MS/s); each lane passes a CFO compensator. A
// data-partition controller keeps one sample in four of every 165-sample
// symbol (41 samples, 4 MSBs of I and Q) and feeds a single 41-sample
// register bank that is shared by the one auto-correlator (before CFO
// compensation for PD and CFO estimation, after it for PTD) and by the
// moving-average-free matched filter (after compensation). A sequencer
// (sync_controller) runs PD -> CFO -> FWD -> PTD.
//
// Clocking: one clock. adc_valid qualifies an input sample; the 4-lane
// part of the design advances once per completed vector, which stands for
// the quarter-rate clock of a four-path implementation.
//
// Ports: coef_neg holds the signs of the 165 matched-filter coefficients
// (the preamble symbol; 1 = negative), lambda1 the PD threshold and eps
// the PTD threshold ratio, both unsigned Q0.8. fft_* carry the compensated
// vectors, fft_sym_start marks the lane holding the first sample of each
// symbol once the FFT window is known. pd_found, fwd_found and sync_done
// are status levels, ptd_pulse marks the PS/FS decision.
//
// The partitioning, the shared registers, the single auto-correlator, the
// 41-tap add/sub matched filter, the two-peak window search and the
// dynamic PTD threshold follow the design; the single-clock formulation,
// the sequencing details and all widths not stated there are choices of
// this implementation (see the module headers).
module uwb_sync_top
  import sync_pkg::*;
#(
  parameter int N_P       = N,
  parameter int OMEGA_P   = OMEGA,
  parameter int LANES_P   = LANES,
  parameter int NUM_PEAKS = 2,
  localparam int NSEL_P   = N_P / OMEGA_P,
  localparam int KW       = $clog2(N_P)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sync_en,
  input  logic                      adc_valid,
  input  adc_sample_t               adc_sample,
  input  logic [N_P-1:0]            coef_neg,
  input  logic [7:0]                lambda1,
  input  logic [7:0]                eps,
  output logic                      fft_valid,
  output comp_sample_t              fft_vec [LANES_P],
  output logic [LANES_P-1:0]        fft_sym_start,
  output logic                      pd_found,
  output logic                      fwd_found,
  output logic                      sync_done,
  output logic                      ptd_pulse,
  output logic signed [PHASE_W-1:0] cfo_phase_inc,
  output logic [KW-1:0]             fw_k,
  output sync_state_t               state
);

  // ---------------- input and CFO compensation ----------------
  logic         raw_valid;
  adc_sample_t  raw_vec [LANES_P];
  logic         comp_valid;
  comp_sample_t comp_vec [LANES_P];
  logic         cfo_done;
  logic signed [ANGLE_W-1:0] cfo_angle;

  serial_to_parallel #(.LANES_P(LANES_P)) u_s2p (
    .clk, .rst_n,
    .in_valid  (adc_valid),
    .in_sample (adc_sample),
    .out_valid (raw_valid),
    .out_vec   (raw_vec)
  );

  cfo_compensator #(.LANES_P(LANES_P)) u_comp (
    .clk, .rst_n,
    .load      (cfo_done),
    .phase_inc (cfo_phase_inc),
    .in_valid  (raw_valid),
    .in_vec    (raw_vec),
    .out_valid (comp_valid),
    .out_vec   (comp_vec)
  );

  // ---------------- data partition and shared registers ----------------
  logic          src_comp;
  logic          dp_valid;
  part_sample_t  dp_vec [LANES_P];
  logic          sel_valid, sel_first, sel_last;
  part_sample_t  sel_sample;
  logic [$clog2(NSEL_P)-1:0] sel_idx;
  logic [LANES_P-1:0] lane_start;
  logic [KW-1:0] dp_pos;
  logic          realign;
  logic [KW-1:0] realign_shift;

  always_comb begin
    dp_valid = src_comp ? comp_valid : raw_valid;
    for (int i = 0; i < LANES_P; i++) begin
      // MSB 4 bits of the 5-bit raw or the 6-bit compensated sample
      dp_vec[i].re = src_comp ? comp_vec[i].re[COMP_W-1 -: PART_W] : raw_vec[i].re[ADC_W-1 -: PART_W];
      dp_vec[i].im = src_comp ? comp_vec[i].im[COMP_W-1 -: PART_W] : raw_vec[i].im[ADC_W-1 -: PART_W];
    end
  end

  data_partition_controller #(.N_P(N_P), .OMEGA_P(OMEGA_P), .LANES_P(LANES_P)) u_dpc (
    .clk, .rst_n,
    .in_valid   (dp_valid),
    .in_vec     (dp_vec),
    .realign    (realign),
    .shift      (realign_shift),
    .sel_valid  (sel_valid),
    .sel_sample (sel_sample),
    .sel_idx    (sel_idx),
    .sel_first  (sel_first),
    .sel_last   (sel_last),
    .lane_start (lane_start),
    .pos        (dp_pos)
  );

  logic         reg_shift, reg_clear;
  part_sample_t reg_tail;
  part_sample_t reg_taps [NSEL_P];

  sample_registers #(.DEPTH(NSEL_P)) u_regs (
    .clk, .rst_n,
    .clear    (reg_clear),
    .shift    (reg_shift),
    .din      (sel_sample),
    .tail_out (reg_tail),
    .taps     (reg_taps)
  );

  // ---------------- auto-correlator, PD, CFO estimation ----------------
  logic       ac_valid;
  ac_result_t ac_out;
  logic [7:0] ac_p;
  logic       pd_valid, pd_ratio_ok, pd_detect, cfo_start;

  auto_correlator u_ac (
    .clk, .rst_n,
    .in_valid  (sel_valid),
    .in_first  (sel_first),
    .in_last   (sel_last),
    .cur       (sel_sample),
    .prev      (reg_tail),
    .res_valid (ac_valid),
    .ac_out    (ac_out),
    .p_out     (ac_p)
  );

  packet_detector u_pd (
    .clk, .rst_n,
    .in_valid (pd_valid),
    .ac_in    (ac_out),
    .p_in     (ac_p),
    .lambda1  (lambda1),
    .ratio_ok (pd_ratio_ok),
    .detect   (pd_detect)
  );

  cfo_estimator #(.N_P(N_P)) u_cfo (
    .clk, .rst_n,
    .ce        (raw_valid),
    .start     (cfo_start),
    .ac_in     (ac_out),
    .done      (cfo_done),
    .angle     (cfo_angle),
    .phase_inc (cfo_phase_inc)
  );

  // ---------------- matched filter and FFT-window detection ----------------
  localparam int MF_W = 11;
  logic                   mf_start, mf_valid, mf_last;
  logic [KW-1:0]          mf_k;
  logic [LANES_P-1:0]     mf_lane_ok;
  logic signed [MF_W-1:0] mf_re [LANES_P];
  logic signed [MF_W-1:0] mf_im [LANES_P];
  logic                   fw_done;
  logic [KW-1:0]          peak_k   [NUM_PEAKS];
  logic [2*MF_W-1:0]      peak_pow [NUM_PEAKS];

  matched_filter #(.N_P(N_P), .OMEGA_P(OMEGA_P), .TAPS(NSEL_P), .UNITS(LANES_P), .OUT_W(MF_W)) u_mf (
    .clk, .rst_n,
    .ce          (raw_valid),
    .start       (mf_start),
    .coef_neg    (coef_neg),
    .taps        (reg_taps),
    .out_valid   (mf_valid),
    .out_last    (mf_last),
    .out_k       (mf_k),
    .out_lane_ok (mf_lane_ok),
    .out_re      (mf_re),
    .out_im      (mf_im)
  );

  fw_detector #(.N_P(N_P), .UNITS(LANES_P), .IN_W(MF_W), .NUM_PEAKS(NUM_PEAKS)) u_fwd (
    .clk, .rst_n,
    .clear      (mf_start),
    .in_valid   (mf_valid),
    .in_last    (mf_last),
    .in_k       (mf_k),
    .in_lane_ok (mf_lane_ok),
    .in_re      (mf_re),
    .in_im      (mf_im),
    .done       (fw_done),
    .k_fw       (fw_k),
    .peak_k     (peak_k),
    .peak_pow   (peak_pow)
  );

  // ---------------- preamble-timing detection ----------------
  logic ptd_clear, ptd_valid, ptd_found;

  pt_detector u_ptd (
    .clk, .rst_n,
    .clear    (ptd_clear),
    .in_valid (ptd_valid),
    .ac_in    (ac_out),
    .p_in     (ac_p),
    .eps      (eps),
    .detect   (ptd_pulse)
  );

  // ---------------- sequencing ----------------
  sync_controller u_ctrl (
    .clk, .rst_n,
    .sync_en,
    .sel_valid,
    .sel_last,
    .ac_valid,
    .pd_detect,
    .cfo_done,
    .fw_done,
    .fw_k,
    .ptd_detect (ptd_pulse),
    .state,
    .src_comp,
    .reg_shift,
    .reg_clear,
    .pd_valid,
    .cfo_start,
    .mf_start,
    .realign,
    .realign_shift,
    .ptd_clear,
    .ptd_valid,
    .pd_found,
    .fwd_found,
    .ptd_found
  );

  // ---------------- to the FFT ----------------
  assign fft_valid     = comp_valid;
  assign fft_vec       = comp_vec;
  assign fft_sym_start = fwd_found ? lane_start : '0;
  assign sync_done     = ptd_found;

endmodule
