// Serial-to-parallel converter at the synchronizer input.
//
// The ADC delivers one 5-bit I/Q sample per sample period. This block
// gathers LANES consecutive samples and presents them as one vector, lane 0
// holding the oldest, so that everything downstream processes LANES samples
// per cycle at a quarter of the sample rate (132 MHz for 528 MS/s).
// Here both sides share one clock: in_valid qualifies an input sample and
// out_valid pulses for one cycle when a full vector is ready; that pulse is
// the clock enable of the slower datapath. The lane order and the
// single-clock formulation are choices of this implementation.
module serial_to_parallel
  import sync_pkg::*;
#(
  parameter int LANES_P = LANES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  adc_sample_t in_sample,
  output logic        out_valid,
  output adc_sample_t out_vec [LANES_P]
);

  localparam int CW = $clog2(LANES_P);

  logic [CW-1:0] cnt;
  adc_sample_t   buffer [LANES_P-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < LANES_P; i++) out_vec[i] <= '0;
      for (int i = 0; i < LANES_P-1; i++) buffer[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (int'(cnt) == LANES_P-1) begin
          cnt <= '0;
          for (int i = 0; i < LANES_P-1; i++) out_vec[i] <= buffer[i];
          out_vec[LANES_P-1] <= in_sample;
          out_valid <= 1'b1;
        end else begin
          buffer[cnt] <= in_sample;
          cnt         <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
