// Data-partition controller.
//
// Keeps track of where the four lanes sit inside the N-sample preamble
// symbol and passes on only one of OMEGA sample groups: the samples at
// offsets 0, OMEGA, 2*OMEGA, ..., OMEGA*(NSEL-1) of every symbol (offsets
// 0..160 for N = 165, OMEGA = 4, NSEL = 41). Because N is not a multiple of
// OMEGA the selected lane changes from symbol to symbol; with OMEGA = LANES
// at most one lane per vector is selected. The selected sample is forwarded
// with its index n (offset / OMEGA) and flags for the first (n = 0) and last
// (n = NSEL-1) sample of the symbol.
//
// pos is the symbol offset of lane 0 of the incoming vector. It starts at 0
// (arbitrary framing, enough for packet detection and CFO estimation) and
// can be moved once the FFT window is known: a realign pulse subtracts
// shift from the framing, so that the sample that was at offset shift
// becomes offset 0.
//
// Interface: in_valid qualifies in_vec (the MSB-4-bit samples). sel_*
// outputs are registered (one cycle latency). lane_start is combinational
// and marks, for the current input vector, the lane that is at offset 0.
//
// Selecting every OMEGA-th sample follows the partitioned correlation and matched-filter sums;
// the counter-based framing and the realign interface are this
// implementation's choices.
module data_partition_controller
  import sync_pkg::*;
#(
  parameter int N_P     = N,
  parameter int OMEGA_P = OMEGA,
  parameter int LANES_P = LANES,
  localparam int NSEL_P = N_P / OMEGA_P,
  localparam int PW     = $clog2(N_P),
  localparam int IW     = $clog2(NSEL_P)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  part_sample_t in_vec [LANES_P],
  input  logic         realign,
  input  logic [PW-1:0] shift,
  output logic         sel_valid,
  output part_sample_t sel_sample,
  output logic [IW-1:0] sel_idx,
  output logic         sel_first,
  output logic         sel_last,
  output logic [LANES_P-1:0] lane_start,
  output logic [PW-1:0] pos
);

  // v is always within (-N_P, 2*N_P): one correction step is enough
  function automatic logic [PW-1:0] wrap(input int v);
    int r;
    r = v;
    if (r >= N_P) r -= N_P;
    if (r < 0)    r += N_P;
    return PW'(r);
  endfunction

  logic [PW-1:0] lane_pos [LANES_P];
  logic          hit;
  logic [$clog2(LANES_P)-1:0] hit_lane;

  always_comb begin
    hit      = 1'b0;
    hit_lane = 0;
    for (int i = 0; i < LANES_P; i++) begin
      lane_pos[i]   = wrap(int'(pos) + i);
      lane_start[i] = in_valid && (lane_pos[i] == '0);
      if ((int'(lane_pos[i]) % OMEGA_P == 0) && (int'(lane_pos[i]) < NSEL_P * OMEGA_P) && !hit) begin
        hit      = 1'b1;
        hit_lane = ($clog2(LANES_P))'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= '0;
      sel_valid  <= 1'b0;
      sel_sample <= '0;
      sel_idx    <= '0;
      sel_first  <= 1'b0;
      sel_last   <= 1'b0;
    end else begin
      sel_valid <= in_valid && hit;
      sel_first <= 1'b0;
      sel_last  <= 1'b0;
      if (in_valid && hit) begin
        sel_sample <= in_vec[hit_lane];
        sel_idx    <= IW'(int'(lane_pos[hit_lane]) / OMEGA_P);
        sel_first  <= (lane_pos[hit_lane] == '0);
        sel_last   <= (int'(lane_pos[hit_lane]) == (NSEL_P-1) * OMEGA_P);
      end
      if (realign)
        pos <= wrap(int'(pos) + (in_valid ? LANES_P : 0) - int'(shift));
      else if (in_valid)
        pos <= wrap(int'(pos) + LANES_P);
    end
  end

endmodule
