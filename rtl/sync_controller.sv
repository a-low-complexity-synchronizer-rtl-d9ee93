// Synchronizer sequencer.
//
// Steps through the tasks the preamble is used for, in order: packet
// detection (PD), CFO estimation, FFT-window detection (FWD) and
// preamble-timing detection (PTD).
//   PD      the shared registers act as the auto-correlator's delay line on
//           raw ADC samples; wait for the packet detector.
//   CFO     hand the next AC result to the CFO estimator; when it is done
//           the compensator takes the new phase increment (wired outside)
//           and the registers switch to compensated samples.
//   MF_WAIT let the current symbol run out (until the sample with n = 40),
//           so that the capture begins at n = 0.
//   MF_CAP  shift in the 41 samples of one symbol, then start the matched
//           filter with the registers frozen.
//   MF_RUN  wait for the FFT-window detector; move the symbol framing to
//           the detected boundary (realign) and clear the PTD history.
//   PTD     registers shift again; the first SKIP AC results after the
//           realignment mix two framings and are dropped, the rest go to
//           the PT detector.
//   DONE    FFT window and PS/FS boundary are known.
// Dropping sync_en returns to IDLE from any state.
//
// All outputs except the state flags are single-cycle pulses or levels
// decoded from the state; the controller adds no latency of its own
// beyond one register for the pulses.
//
// The order of the tasks is the design's; the state split, the skipped
// results and the restart on sync_en are choices of this implementation.
module sync_controller
  import sync_pkg::*;
#(
  parameter int SKIP = 2,
  localparam int KW  = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sync_en,
  input  logic          sel_valid,
  input  logic          sel_last,
  input  logic          ac_valid,
  input  logic          pd_detect,
  input  logic          cfo_done,
  input  logic          fw_done,
  input  logic [KW-1:0] fw_k,
  input  logic          ptd_detect,
  output sync_state_t   state,
  output logic          src_comp,     // registers take compensated samples
  output logic          reg_shift,
  output logic          reg_clear,
  output logic          pd_valid,     // AC result to the packet detector
  output logic          cfo_start,
  output logic          mf_start,
  output logic          realign,
  output logic [KW-1:0] realign_shift,
  output logic          ptd_clear,
  output logic          ptd_valid,    // AC result to the PT detector
  output logic          pd_found,
  output logic          fwd_found,
  output logic          ptd_found
);

  logic [$clog2(SKIP+1)-1:0] skip_cnt;

  always_comb begin
    src_comp  = state inside {ST_MF_WAIT, ST_MF_CAP, ST_MF_RUN, ST_PTD, ST_DONE};
    reg_shift = sel_valid && (state inside {ST_PD, ST_CFO, ST_MF_CAP, ST_PTD});
    pd_valid  = ac_valid && (state == ST_PD);
    ptd_valid = ac_valid && (state == ST_PTD) && (skip_cnt == '0);
    cfo_start = ac_valid && (state == ST_CFO);
    pd_found  = state inside {ST_CFO, ST_MF_WAIT, ST_MF_CAP, ST_MF_RUN, ST_PTD, ST_DONE};
    fwd_found = state inside {ST_PTD, ST_DONE};
    ptd_found = (state == ST_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      skip_cnt <= '0;
      reg_clear <= 1'b0; mf_start <= 1'b0; realign <= 1'b0; realign_shift <= '0;
      ptd_clear <= 1'b0;
    end else begin
      reg_clear <= 1'b0;
      mf_start  <= 1'b0;
      realign   <= 1'b0;
      ptd_clear <= 1'b0;
      if (!sync_en) begin
        state <= ST_IDLE;
      end else begin
        unique case (state)
          ST_IDLE: begin
            state     <= ST_PD;
            reg_clear <= 1'b1;
          end
          ST_PD:      if (pd_detect) state <= ST_CFO;
          ST_CFO:     if (cfo_done)  state <= ST_MF_WAIT;
          ST_MF_WAIT: if (sel_valid && sel_last) state <= ST_MF_CAP;
          ST_MF_CAP: begin
            if (sel_valid && sel_last) begin
              state    <= ST_MF_RUN;
              mf_start <= 1'b1;
            end
          end
          ST_MF_RUN: begin
            if (fw_done) begin
              state         <= ST_PTD;
              realign       <= 1'b1;
              realign_shift <= fw_k;
              ptd_clear     <= 1'b1;
              skip_cnt      <= ($clog2(SKIP+1))'(SKIP);
            end
          end
          ST_PTD: begin
            if (ac_valid && skip_cnt != '0) skip_cnt <= skip_cnt - 1'b1;
            if (ptd_detect) state <= ST_DONE;
          end
          ST_DONE: ;
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

endmodule
