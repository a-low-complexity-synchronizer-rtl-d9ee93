// Preamble-timing detector with dynamic threshold.
//
// The frame-sequence symbols are sign-inverted packet-sequence symbols, so
// the sum of two consecutive auto-correlation results collapses when the
// second of the two correlated symbol pairs straddles the PS/FS boundary.
// For every AC result A(m) the block forms
//   S(m) = A(m) + A(m-1),   Q(m) = P(m) + P(m-1)
// and declares the boundary when |S(m)|^2 <= lambda2 * Q(m)^2,
// with a threshold that follows the channel:
//   lambda2 = eps * |S(m-1)|^2 / Q(m-1)^2.
// Both are combined into one division-free test,
//   256 * |S(m)|^2 * Q(m-1)^2 <= eps * |S(m-1)|^2 * Q(m)^2,
// eps being an unsigned Q0.8 number. P(m) is the power of symbol m; since
// the auto-correlator delivers P(m+1) together with A(m), the block keeps
// the powers of the two previous results. The first decision is made on
// the fourth result after clear.
//
// Interface: clear resets the history; in_valid qualifies one AC result
// (A(m) in ac_in, P(m+1) in p_in). detect pulses one cycle later.
//
// The test and the adaptive threshold are the design's. The Q0.8 format
// of eps and the division-free form are choices of this implementation.
module pt_detector
  import sync_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       in_valid,
  input  ac_result_t ac_in,
  input  logic [7:0] p_in,
  input  logic [7:0] eps,
  output logic       detect
);

  ac_result_t               a_prev;          // A(m-1)
  logic [7:0]               p_m, p_m1;       // P(m), P(m-1)
  logic [18:0]              s_pow_prev;      // |S(m-1)|^2
  logic [8:0]               q_prev;          // Q(m-1)
  logic [2:0]               count;           // results seen, saturating at 4

  logic signed [AC_W:0]     s_re, s_im;
  logic [18:0]              s_pow;
  logic [8:0]               q;
  logic [63:0]              lhs, rhs;
  logic                     hit;

  always_comb begin
    s_re  = (AC_W+1)'(ac_in.re) + (AC_W+1)'(a_prev.re);
    s_im  = (AC_W+1)'(ac_in.im) + (AC_W+1)'(a_prev.im);
    s_pow = 19'(unsigned'(19'(s_re * s_re) + 19'(s_im * s_im)));
    q     = 9'(p_m) + 9'(p_m1);
    lhs   = (64'(s_pow) * 64'(q_prev) * 64'(q_prev)) << 8;
    rhs   = 64'(eps) * 64'(s_pow_prev) * 64'(q) * 64'(q);
    hit   = (count >= 3'd3) && (lhs <= rhs);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_prev <= '0; p_m <= '0; p_m1 <= '0; s_pow_prev <= '0; q_prev <= '0;
      count <= '0; detect <= 1'b0;
    end else if (clear) begin
      a_prev <= '0; p_m <= '0; p_m1 <= '0; s_pow_prev <= '0; q_prev <= '0;
      count <= '0; detect <= 1'b0;
    end else begin
      detect <= in_valid && hit;
      if (in_valid) begin
        a_prev     <= ac_in;
        p_m        <= p_in;      // becomes P(m+1) -> P(m) for the next result
        p_m1       <= p_m;
        s_pow_prev <= s_pow;
        q_prev     <= q;
        if (count != 3'd4) count <= count + 1'b1;
      end
    end
  end

endmodule
