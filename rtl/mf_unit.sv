// One matched-filter unit: TAPS add/subtract taps and their sum.
//
// The preamble coefficients have constant magnitude and only differ in
// sign, so each tap adds or subtracts its sample (I and Q alike) instead
// of multiplying; neg[l] = 1 subtracts tap l. The result is the complex
// sum over all taps, combinational.
module mf_unit
  import sync_pkg::*;
#(
  parameter int TAPS  = NSEL,
  parameter int OUT_W = 11
) (
  input  part_sample_t             taps [TAPS],
  input  logic [TAPS-1:0]          neg,
  output logic signed [OUT_W-1:0]  sum_re,
  output logic signed [OUT_W-1:0]  sum_im
);

  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int l = 0; l < TAPS; l++) begin
      if (neg[l]) begin
        sum_re = sum_re - OUT_W'(taps[l].re);
        sum_im = sum_im - OUT_W'(taps[l].im);
      end else begin
        sum_re = sum_re + OUT_W'(taps[l].re);
        sum_im = sum_im + OUT_W'(taps[l].im);
      end
    end
  end

endmodule
