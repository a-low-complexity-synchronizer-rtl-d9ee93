// Single auto-correlator with symbol-power accumulator.
//
// Computes, once per preamble symbol, the partitioned auto-correlation
//   A(m) = sum_{n=0}^{NSEL-1} r(m*N + OMEGA*n) * conj(r((m+1)*N + OMEGA*n))
// and the power of the newer symbol P(m+1) = sum |r((m+1)*N + OMEGA*n)|^2.
// Each selected sample of symbol m+1 (cur) arrives together with the
// sample of the same index n of symbol m (prev, the tail of the shared
// register bank); cur is conjugated, multiplied with prev and accumulated.
// The accumulators restart on the sample with n = 0 and are read out after
// the sample with n = NSEL-1. The common factor OMEGA of the partitioned sum is left
// out: it cancels in every ratio the detectors use.
//
// Output format: the 15-bit sums are divided by 2^SH with rounding to
// nearest and saturated to 8 bits (ac_out: signed, symmetric +/-127;
// p_out: unsigned). SH = 4 puts a preamble at roughly half of the 4-bit
// input range well inside the 8-bit range; only inputs near full scale
// saturate. Rounding matters: plain truncation turns the small negative
// correlation sums of noise into -1 and can trip the packet detector.
//
// Interface: in_valid with first/last flags from the data-partition
// controller; res_valid pulses one cycle after the last sample of a symbol.
//
// One multiplier fed by the conjugated new sample and the stored sample,
// with the 8-bit MSB output, follows the design; the power accumulator
// and the scaling are choices of this implementation.
module auto_correlator
  import sync_pkg::*;
#(
  parameter int ACC_W = 15,
  parameter int SH    = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  part_sample_t cur,
  input  part_sample_t prev,
  output logic         res_valid,
  output ac_result_t   ac_out,
  output logic [7:0]   p_out
);

  logic signed [ACC_W-1:0] acc_re, acc_im;
  logic        [ACC_W-2:0] acc_p;
  logic signed [ACC_W-1:0] prod_re, prod_im, sum_re, sum_im;
  logic        [ACC_W-2:0] pow, sum_p;

  // Round to nearest, drop SH LSBs, saturate to the output format.
  function automatic logic signed [AC_W-1:0] scale_ac(input logic signed [ACC_W-1:0] v);
    logic signed [ACC_W:0] r;
    r = ((ACC_W+1)'(v) + (ACC_W+1)'(2 ** (SH-1))) >>> SH;
    if (r > (ACC_W+1)'(2 ** (AC_W-1) - 1))  return AC_W'(2 ** (AC_W-1) - 1);
    if (r < -(ACC_W+1)'(2 ** (AC_W-1) - 1)) return AC_W'(-(2 ** (AC_W-1) - 1));
    return r[AC_W-1:0];
  endfunction

  function automatic logic [7:0] scale_p(input logic [ACC_W-2:0] v);
    logic [ACC_W-1:0] r;
    r = ((ACC_W)'(v) + (ACC_W)'(2 ** (SH-1))) >> SH;
    return (r > 255) ? 8'd255 : r[7:0];
  endfunction

  always_comb begin
    // prev * conj(cur)
    prod_re = ACC_W'(prev.re * cur.re) + ACC_W'(prev.im * cur.im);
    prod_im = ACC_W'(prev.im * cur.re) - ACC_W'(prev.re * cur.im);
    pow     = (ACC_W-1)'(unsigned'(ACC_W'(cur.re * cur.re) + ACC_W'(cur.im * cur.im)));
    sum_re  = in_first ? prod_re : acc_re + prod_re;
    sum_im  = in_first ? prod_im : acc_im + prod_im;
    sum_p   = in_first ? pow     : acc_p  + pow;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0; acc_im <= '0; acc_p <= '0;
      res_valid <= 1'b0; ac_out <= '0; p_out <= '0;
    end else begin
      res_valid <= 1'b0;
      if (in_valid) begin
        acc_re <= sum_re;
        acc_im <= sum_im;
        acc_p  <= sum_p;
        if (in_last) begin
          res_valid <= 1'b1;
          ac_out.re <= scale_ac(sum_re);
          ac_out.im <= scale_ac(sum_im);
          p_out     <= scale_p(sum_p);
        end
      end
    end
  end

endmodule
