// Moving-average-free matched filter.
//
// Because the preamble symbol repeats with period N, a window starting at
// timing k can be rebuilt from one stored symbol r(0..N-1) by wrapping
// around. The matched-filter output for every timing k therefore uses the
// same stored samples, and with the data partition only every OMEGA-th
// of them:
//   M(k) = sum_{l=0}^{TAPS-1} r(OMEGA*l) * C((OMEGA*l - k) mod N),
// with C(n) = +1 or -1 (coef_neg[n] = 1 means -1). The common factor
// OMEGA is left out.
//
// UNITS add/subtract units (41 taps each) share the TAPS stored samples
// and evaluate UNITS consecutive timings per enabled cycle: in step c,
// unit j computes k = UNITS*c + j. The coefficient pattern is held in an
// N-bit circular register rot, where rot[i] = C((i - UNITS*c) mod N); unit
// j takes for tap l the bit rot[(OMEGA*l - j) mod N], which is fixed
// wiring, and rot turns by UNITS positions after each step. All N timings
// take ceil(N/UNITS) = 42 steps.
//
// Interface: start loads the coefficients and begins a sweep; the taps must
// stay constant during it. Each enabled step registers UNITS sums
// (out_valid pulses for one clock, out_k = k of unit 0, out_lane_ok marks
// k < N) and out_last flags the final step. out_k is always a multiple of
// UNITS, so its low bits are constant zero; it is kept as a plain timing
// index for the consumer. Output latency: one enabled cycle per step.
//
// Four units of 41 add/sub taps and the add/sub control are the design's;
// the circular coefficient register and the step order are this
// implementation's way of generating the add/sub control.
module matched_filter
  import sync_pkg::*;
#(
  parameter int N_P     = N,
  parameter int OMEGA_P = OMEGA,
  parameter int TAPS    = NSEL,
  parameter int UNITS   = LANES,
  parameter int OUT_W   = 11,
  localparam int STEPS  = (N_P + UNITS - 1) / UNITS,
  localparam int KW     = $clog2(N_P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    start,
  input  logic [N_P-1:0]          coef_neg,
  input  part_sample_t            taps [TAPS],
  output logic                    out_valid,
  output logic                    out_last,
  output logic [KW-1:0]           out_k,
  output logic [UNITS-1:0]        out_lane_ok,
  output logic signed [OUT_W-1:0] out_re [UNITS],
  output logic signed [OUT_W-1:0] out_im [UNITS]
);

  logic [N_P-1:0]           rot;
  logic [$clog2(STEPS)-1:0] step;
  logic                     busy;

  logic [TAPS-1:0]          neg    [UNITS];
  logic signed [OUT_W-1:0]  sum_re [UNITS];
  logic signed [OUT_W-1:0]  sum_im [UNITS];

  for (genvar j = 0; j < UNITS; j++) begin : g_unit
    for (genvar l = 0; l < TAPS; l++) begin : g_tap
      localparam int IDX = (OMEGA_P * l - j + N_P) % N_P;
      assign neg[j][l] = rot[IDX];
    end
    mf_unit #(.TAPS(TAPS), .OUT_W(OUT_W)) u_unit (
      .taps   (taps),
      .neg    (neg[j]),
      .sum_re (sum_re[j]),
      .sum_im (sum_im[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rot <= '0; step <= '0; busy <= 1'b0;
      out_valid <= 1'b0; out_last <= 1'b0; out_k <= '0; out_lane_ok <= '0;
      for (int j = 0; j < UNITS; j++) begin out_re[j] <= '0; out_im[j] <= '0; end
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (start) begin
        rot  <= coef_neg;
        step <= '0;
        busy <= 1'b1;
      end else if (busy && ce) begin
        out_valid <= 1'b1;
        out_last  <= (int'(step) == STEPS-1);
        out_k     <= KW'(int'(step) * UNITS);
        for (int j = 0; j < UNITS; j++) begin
          out_lane_ok[j] <= (int'(step) * UNITS + j) < N_P;
          out_re[j]      <= sum_re[j];
          out_im[j]      <= sum_im[j];
        end
        // rot'[i] = rot[(i - UNITS) mod N]
        rot  <= {rot[N_P-UNITS-1:0], rot[N_P-1 -: UNITS]};
        step <= step + 1'b1;
        if (int'(step) == STEPS-1) busy <= 1'b0;
      end
    end
  end

endmodule
