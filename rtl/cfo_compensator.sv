// CFO compensator: one phase rotator per lane.
//
// Removes the carrier-frequency offset found by the CFO estimator by
// multiplying every sample with exp(j*phi), where phi grows by phase_inc per
// sample. A numerically controlled oscillator keeps the phase of lane 0;
// lane i uses phase + i*phase_inc, and the accumulator advances by
// LANES*phase_inc per vector. Cosine and sine come from a 2^LUT_BITS entry
// table addressed by the top phase bits, 8-bit amplitude 127, filled at
// elaboration time from cos/sin. Each lane then does a complex multiply,
// rounds by 2^7 (gain 127/128) and saturates to the 6-bit output.
//
// Interface: load pulses with phase_inc valid (signed, 2^PHASE_W = 2*pi per
// sample) and restarts the phase at zero. Before the first load the
// increment is zero and the block passes samples through. in_valid/out_valid
// qualify vectors; latency is two enabled cycles (table lookup, then
// multiply).
//
// The document says only that the compensators are complex multipliers and
// that their output is 6-bit I/Q; the NCO, table size and rounding are
// choices of this implementation.
module cfo_compensator
  import sync_pkg::*;
#(
  parameter int LANES_P  = LANES,
  parameter int PHASE_WP = PHASE_W,
  parameter int LUT_BITS = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load,
  input  logic signed [PHASE_WP-1:0] phase_inc,
  input  logic                       in_valid,
  input  adc_sample_t                in_vec  [LANES_P],
  output logic                       out_valid,
  output comp_sample_t               out_vec [LANES_P]
);

  localparam int LUT_N = 2 ** LUT_BITS;
  localparam int AMP   = 127;
  localparam int SHIFT = 7;

  typedef logic signed [7:0] lut_t [LUT_N];

  function automatic lut_t make_lut(input bit is_sin);
    lut_t t;
    real  pi;
    pi = 3.14159265358979323846;
    for (int i = 0; i < LUT_N; i++) begin
      if (is_sin) t[i] = 8'(int'(AMP * $sin(2.0 * pi * i / LUT_N)));
      else        t[i] = 8'(int'(AMP * $cos(2.0 * pi * i / LUT_N)));
    end
    return t;
  endfunction

  localparam lut_t COS_LUT = make_lut(1'b0);
  localparam lut_t SIN_LUT = make_lut(1'b1);

  logic signed [PHASE_WP-1:0] inc_q, acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_q <= '0;
      acc_q <= '0;
    end else if (load) begin
      inc_q <= phase_inc;
      acc_q <= '0;
    end else if (in_valid) begin
      acc_q <= acc_q + PHASE_WP'(LANES_P) * inc_q;
    end
  end

  // Stage 1: per-lane phase, table lookup.
  logic                 s1_valid;
  adc_sample_t          s1_x   [LANES_P];
  logic signed [7:0]    s1_cos [LANES_P];
  logic signed [7:0]    s1_sin [LANES_P];
  logic [PHASE_WP-1:0]  ph     [LANES_P];
  logic [LUT_BITS-1:0]  idx    [LANES_P];

  always_comb begin
    for (int i = 0; i < LANES_P; i++) begin
      ph[i]  = acc_q + PHASE_WP'(i) * inc_q;
      // round the phase to the nearest table entry
      idx[i] = LUT_BITS'((ph[i] + (PHASE_WP'(1) << (PHASE_WP-LUT_BITS-1))) >> (PHASE_WP-LUT_BITS));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      for (int i = 0; i < LANES_P; i++) begin
        s1_x[i] <= '0; s1_cos[i] <= '0; s1_sin[i] <= '0;
      end
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < LANES_P; i++) begin
          s1_x[i]   <= in_vec[i];
          s1_cos[i] <= COS_LUT[idx[i]];
          s1_sin[i] <= SIN_LUT[idx[i]];
        end
      end
    end
  end

  // Stage 2: complex multiply, round, saturate.
  function automatic logic signed [COMP_W-1:0] sat(input logic signed [15:0] v);
    localparam logic signed [15:0] MAXV = 16'(2 ** (COMP_W-1) - 1);
    localparam logic signed [15:0] MINV = -MAXV - 16'sd1;
    if (v > MAXV)      return MAXV[COMP_W-1:0];
    else if (v < MINV) return MINV[COMP_W-1:0];
    else               return v[COMP_W-1:0];
  endfunction

  logic signed [15:0] pr [LANES_P];
  logic signed [15:0] pq [LANES_P];

  always_comb begin
    for (int i = 0; i < LANES_P; i++) begin
      pr[i] = 16'(s1_x[i].re * s1_cos[i]) - 16'(s1_x[i].im * s1_sin[i]);
      pq[i] = 16'(s1_x[i].re * s1_sin[i]) + 16'(s1_x[i].im * s1_cos[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < LANES_P; i++) out_vec[i] <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        for (int i = 0; i < LANES_P; i++) begin
          out_vec[i].re <= sat((pr[i] + 16'sd64) >>> SHIFT);
          out_vec[i].im <= sat((pq[i] + 16'sd64) >>> SHIFT);
        end
      end
    end
  end

endmodule
