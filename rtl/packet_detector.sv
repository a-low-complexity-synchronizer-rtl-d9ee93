// Packet detector.
//
// Declares a packet when the auto-correlation power of a symbol pair
// exceeds a fixed fraction of the squared power of the newer symbol,
//   |A(m)|^2 >= lambda1 * P(m+1)^2
// and P(m+1) is non-zero. lambda1 is an unsigned Q0.8 number (value/256),
// so the test is done without division as 256*|A|^2 >= lambda1*P^2.
//
// Interface: in_valid qualifies one AC result; detect pulses one cycle
// later when the test holds. ratio_ok is the same decision,
// combinational.
//
// The threshold test is the design's. The Q0.8 threshold format and the
// extra P > 0 condition (so that an all-zero input cannot trigger) are
// choices of this implementation.
module packet_detector
  import sync_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  ac_result_t ac_in,
  input  logic [7:0] p_in,
  input  logic [7:0] lambda1,
  output logic       ratio_ok,
  output logic       detect
);

  logic [31:0] ac_pow, lhs, rhs;

  always_comb begin
    ac_pow   = 32'(unsigned'(32'(ac_in.re * ac_in.re) + 32'(ac_in.im * ac_in.im)));
    lhs      = ac_pow << 8;
    rhs      = 32'(lambda1) * 32'(p_in) * 32'(p_in);
    ratio_ok = (lhs >= rhs) && (p_in != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) detect <= 1'b0;
    else        detect <= in_valid && ratio_ok;
  end

endmodule
