// Unit test of sync_controller: plays the events of one preamble in
// order and checks the sequencer's reaction at each step: register input
// select, which selections shift the registers, AC results routed to the
// packet detector only in PD, the CFO start on the first AC result after
// detection, the capture of exactly one whole symbol before the matched
// filter starts, the realignment by the detected offset, two skipped AC
// results before the PT detector sees any, the done state, and the
// return to idle when sync_en drops. Spurious events in the wrong state
// must be ignored.
module tb_sync_controller;
  import sync_pkg::*;
  localparam int KW = $clog2(N);
  logic clk = 0, rst_n = 0, sync_en = 0;
  logic sel_valid = 0, sel_last = 0, ac_valid = 0, pd_detect = 0, cfo_done = 0, fw_done = 0, ptd_detect = 0;
  logic [KW-1:0] fw_k = '0;
  sync_state_t state;
  logic src_comp, reg_shift, reg_clear, pd_valid, cfo_start, mf_start, realign;
  logic [KW-1:0] realign_shift;
  logic ptd_clear, ptd_valid, pd_found, fwd_found, ptd_found;
  sync_controller dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count of pulses seen
  int n_shift = 0, n_mf = 0, n_ptd_valid = 0, n_cfo = 0, n_realign = 0;
  always @(posedge clk) if (rst_n) begin
    n_shift     += int'(reg_shift);
    n_mf        += int'(mf_start);
    n_ptd_valid += int'(ptd_valid);
    n_cfo       += int'(cfo_start);
    n_realign   += int'(realign);
    if (realign) chk(realign_shift == KW'(37), "realign by the detected offset");
  end

  // one selection; last marks n = 40
  task automatic sel(input bit last);
    @(negedge clk);
    sel_valid = 1; sel_last = last;
    @(negedge clk);
    sel_valid = 0; sel_last = 0;
  endtask
  task automatic symbol();
    for (int n = 0; n < NSEL; n++) sel(n == NSEL - 1);
  endtask
  task automatic pulse_ac();
    @(negedge clk); ac_valid = 1; @(negedge clk); ac_valid = 0;
  endtask

  initial begin
    int s0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 2; pkt++) begin
      @(negedge clk);
      chk(state == ST_IDLE, "idle before sync_en");
      sync_en = 1;
      @(negedge clk);
      @(negedge clk);
      chk(state == ST_PD && !src_comp, "PD on raw samples");
      s0 = n_shift; symbol(); chk(n_shift - s0 == NSEL, "registers shift in PD");
      @(negedge clk); ac_valid = 1; #0.1; chk(pd_valid && !cfo_start, "AC result goes to PD"); @(negedge clk); ac_valid = 0;
      fw_done = 1; ptd_detect = 1; cfo_done = 1; @(negedge clk); fw_done = 0; ptd_detect = 0; cfo_done = 0;
      chk(state == ST_PD, "spurious events ignored in PD");
      @(negedge clk); pd_detect = 1; @(negedge clk); pd_detect = 0;
      chk(state == ST_CFO && pd_found, "CFO estimation after PD");
      @(negedge clk); ac_valid = 1; #0.1; chk(cfo_start && !pd_valid, "next AC result starts the CFO estimator"); @(negedge clk); ac_valid = 0;
      repeat (5) @(negedge clk);
      cfo_done = 1; @(negedge clk); cfo_done = 0;
      chk(state == ST_MF_WAIT && src_comp, "registers switched to compensated samples");
      // finish the current (partial) symbol: no shifting meanwhile
      s0 = n_shift;
      for (int n = 20; n < NSEL; n++) sel(n == NSEL - 1);
      chk(n_shift == s0 && state == ST_MF_CAP, "wait for symbol end without shifting");
      symbol();
      chk(n_shift - s0 == NSEL, "exactly one symbol captured");
      @(negedge clk);
      chk(state == ST_MF_RUN && n_mf == pkt + 1, "matched filter started");
      s0 = n_shift; symbol(); chk(n_shift == s0, "registers frozen during the sweep");
      @(negedge clk); fw_k = KW'(37); fw_done = 1; @(negedge clk); fw_done = 0;
      @(negedge clk);
      chk(state == ST_PTD && fwd_found && n_realign == pkt + 1, "realigned, PTD running");
      s0 = n_ptd_valid;
      pulse_ac(); pulse_ac();
      chk(n_ptd_valid == s0, "first two AC results skipped");
      pulse_ac(); pulse_ac(); pulse_ac();
      chk(n_ptd_valid == s0 + 3, "later AC results go to the PT detector");
      @(negedge clk); ptd_detect = 1; @(negedge clk); ptd_detect = 0;
      chk(state == ST_DONE && ptd_found, "done after PS/FS detection");
      s0 = n_shift; symbol(); chk(n_shift == s0, "no shifting when done");
      chk(n_cfo == pkt + 1, "one CFO start per packet");
      @(negedge clk); sync_en = 0; @(negedge clk);
      chk(state == ST_IDLE && !pd_found, "sync_en low returns to idle");
    end
    // restart from the middle of the sequence
    @(negedge clk); sync_en = 1; repeat (3) @(negedge clk);
    pd_detect = 1; @(negedge clk); pd_detect = 0;
    chk(state == ST_CFO, "CFO state again");
    sync_en = 0; @(negedge clk);
    chk(state == ST_IDLE, "abort from CFO state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
