// Shared sample register bank (41 samples).
//
// Holds the DEPTH partitioned samples of one preamble symbol. It serves two
// users in turn. For the auto-correlator it is a delay line of exactly one
// symbol: every shift pushes the new sample in at the top and tail_out is
// the sample that entered DEPTH shifts earlier, i.e. the sample with the
// same index n of the previous symbol. For the matched filter it is frozen
// after a symbol has been shifted in and all entries are read in parallel:
// taps[l] is the sample with index n = l of that symbol.
//
// Interface: shift (one cycle) pushes din; clear zeroes the bank. Outputs
// are the register contents, no extra latency.
//
// Sharing one 41-sample bank between the auto-correlator and the matched
// filter is the design's; the shift-register organisation and the clear
// input are choices of this implementation.
module sample_registers
  import sync_pkg::*;
#(
  parameter int DEPTH = NSEL
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         shift,
  input  part_sample_t din,
  output part_sample_t tail_out,
  output part_sample_t taps [DEPTH]
);

  part_sample_t regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < DEPTH-1; i++) regs[i] <= regs[i+1];
      regs[DEPTH-1] <= din;
    end
  end

  assign tail_out = regs[0];
  assign taps     = regs;

endmodule
