// FFT-window detector with sub-optimal timing location.
//
// Receives the matched-filter sums for all N timings, UNITS per step, and
// finds the FFT-window boundary. The argmax of the MF power is not
// reliable with the data partition: the strongest peak may belong to a
// later multipath component. The block therefore keeps the NUM_PEAKS
// strongest local maxima of |M(k)|^2 and reports the earliest of them.
//
// A timing k is a local maximum if P(k) > P(k-1) and P(k) >= P(k+1); the
// neighbours of k = 0 and k = N-1 outside the sweep count as zero. Values
// are judged one step late, once the right neighbour of the last lane has
// arrived, and the final step is judged in the cycle after out_last.
// "Earliest" is taken on the circle of N timings, relative to the strongest
// peak: of the kept peaks whose power is at least PEAK_RATIO/256 of the
// strongest, the one whose offset from the strongest, wrapped into
// (-N/2, N/2], is smallest wins. Without that ratio a weak correlation
// sidelobe ahead of a single dominant path would be taken for the boundary.
// A peak also has to lie no more than MAX_LEAD timings (default: the
// guard-interval length) before the strongest. In a channel with several
// paths the matched-filter energy is spread and the main peak is lower,
// so a sidelobe far ahead of it can come within PEAK_RATIO; a genuine
// earlier path, on the other hand, is never further ahead of the
// strongest than the guard interval the window has to absorb.
//
// Interface: clear (pulse) starts a new search. in_valid/in_last as
// produced by the matched filter. done pulses for one cycle after the
// search with k_fw (the detected boundary) and peak_k/peak_pow (the kept
// peaks, strongest first).
//
// Searching two peaks and taking the earliest is the design's rule for
// OMEGA = 4. The local-maximum definition, the circular "earliest"
// rule and the PEAK_RATIO and MAX_LEAD qualifications are choices of
// this implementation.
module fw_detector
  import sync_pkg::*;
#(
  parameter int N_P       = N,
  parameter int UNITS     = LANES,
  parameter int IN_W      = 11,
  parameter int NUM_PEAKS = 2,
  parameter int PEAK_RATIO = 128,
  parameter int MAX_LEAD  = GI,
  localparam int KW       = $clog2(N_P),
  localparam int PW       = 2 * IN_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic                   in_last,
  input  logic [KW-1:0]          in_k,
  input  logic [UNITS-1:0]       in_lane_ok,
  input  logic signed [IN_W-1:0] in_re [UNITS],
  input  logic signed [IN_W-1:0] in_im [UNITS],
  output logic                   done,
  output logic [KW-1:0]          k_fw,
  output logic [KW-1:0]          peak_k   [NUM_PEAKS],
  output logic [PW-1:0]          peak_pow [NUM_PEAKS]
);

  logic [PW-1:0]    cur_pow  [UNITS];
  logic [PW-1:0]    prev_pow [UNITS];
  logic [UNITS-1:0] prev_ok;
  logic [KW-1:0]    prev_k;
  logic [PW-1:0]    left_pow;
  logic             have_prev, flush;

  logic [PW-1:0]    top_pow [NUM_PEAKS];
  logic [KW-1:0]    top_k   [NUM_PEAKS];
  logic             top_ok  [NUM_PEAKS];

  logic [PW-1:0]    nxt_pow [NUM_PEAKS];
  logic [KW-1:0]    nxt_k   [NUM_PEAKS];
  logic             nxt_ok  [NUM_PEAKS];
  logic             eval;
  logic [PW-1:0]    right_pow;

  always_comb begin
    for (int j = 0; j < UNITS; j++)
      cur_pow[j] = in_lane_ok[j]
                 ? PW'(unsigned'(PW'(in_re[j] * in_re[j]) + PW'(in_im[j] * in_im[j])))
                 : '0;
  end

  // Judge the previous step's lanes and insert local maxima into the list.
  always_comb begin
    logic [PW-1:0] p, l, r, cp, tp;
    logic [KW-1:0] ck, tk;
    logic          ins, to, moved;
    p = '0; l = '0; r = '0; cp = '0; tp = '0; ck = '0; tk = '0; ins = 1'b0; to = 1'b0; moved = 1'b0;
    eval      = have_prev && (in_valid || flush);
    right_pow = flush ? '0 : cur_pow[0];
    nxt_pow   = top_pow;
    nxt_k     = top_k;
    nxt_ok    = top_ok;
    if (eval) begin
      for (int j = 0; j < UNITS; j++) begin
        p = prev_pow[j];
        l = (j == 0) ? left_pow : prev_pow[j-1];
        r = (j == UNITS-1) ? right_pow : prev_pow[j+1];
        if (prev_ok[j] && p > l && p >= r) begin
          // sorted insertion, strongest first; ties keep the earlier entry
          ins = 1'b1;
          cp  = p;
          ck  = KW'(int'(prev_k) + j);
          // an entry pushed down the list was ahead of the ones below it,
          // so it also wins ties against them
          moved = 1'b0;
          for (int q = 0; q < NUM_PEAKS; q++) begin
            if (ins && (!nxt_ok[q] || cp > nxt_pow[q] || (moved && cp == nxt_pow[q]))) begin
              tp = nxt_pow[q]; tk = nxt_k[q]; to = nxt_ok[q];
              nxt_pow[q] = cp; nxt_k[q] = ck; nxt_ok[q] = 1'b1;
              cp = tp; ck = tk; ins = to; moved = 1'b1;
            end
          end
        end
      end
    end
  end

  // Earliest kept peak, relative to the strongest one on the circle.
  logic [KW-1:0] earliest;
  always_comb begin
    int best_off, off;
    earliest = nxt_k[0];
    best_off = 0;
    off      = 0;
    for (int q = 1; q < NUM_PEAKS; q++) begin
      off = int'(nxt_k[q]) - int'(nxt_k[0]);
      if (off > N_P / 2)   off -= N_P;
      if (off <= -(N_P+1) / 2) off += N_P;
      if (nxt_ok[q] && off < best_off && off >= -MAX_LEAD &&
          (64'(nxt_pow[q]) << 8) >= 64'(PEAK_RATIO) * 64'(nxt_pow[0])) begin
        best_off = off;
        earliest = nxt_k[q];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0; flush <= 1'b0; left_pow <= '0; prev_ok <= '0; prev_k <= '0;
      done <= 1'b0; k_fw <= '0;
      for (int j = 0; j < UNITS; j++) prev_pow[j] <= '0;
      for (int q = 0; q < NUM_PEAKS; q++) begin
        top_pow[q] <= '0; top_k[q] <= '0; top_ok[q] <= 1'b0;
        peak_k[q] <= '0; peak_pow[q] <= '0;
      end
    end else if (clear) begin
      have_prev <= 1'b0; flush <= 1'b0; left_pow <= '0; done <= 1'b0;
      for (int q = 0; q < NUM_PEAKS; q++) top_ok[q] <= 1'b0;
    end else begin
      done    <= 1'b0;
      top_pow <= nxt_pow;
      top_k   <= nxt_k;
      top_ok  <= nxt_ok;
      if (flush) begin
        flush     <= 1'b0;
        have_prev <= 1'b0;
        done      <= 1'b1;
        k_fw      <= earliest;
        peak_k    <= nxt_k;
        peak_pow  <= nxt_pow;
      end else if (in_valid) begin
        if (have_prev) left_pow <= prev_pow[UNITS-1];
        prev_pow  <= cur_pow;
        prev_ok   <= in_lane_ok;
        prev_k    <= in_k;
        have_prev <= 1'b1;
        flush     <= in_last;
      end
    end
  end

endmodule
