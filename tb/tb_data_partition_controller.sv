// Unit test of data_partition_controller: a counting sample stream (sample
// a carries a mod 256) passes through; a reference model tracks each
// sample's offset in the N-sample symbol and expects exactly the samples
// with offset 0, 4, ..., 160, with index offset/4 and first/last flags.
// Midway the framing is realigned by a random shift; the model applies the
// same shift. lane_start is checked against offset 0 on every vector.
module tb_data_partition_controller;
  import sync_pkg::*;
  localparam int PW = $clog2(N);
  logic clk = 0, rst_n = 0, in_valid = 0, realign = 0;
  part_sample_t in_vec [LANES];
  logic [PW-1:0] shift = '0;
  logic sel_valid, sel_first, sel_last;
  part_sample_t sel_sample;
  logic [$clog2(NSEL)-1:0] sel_idx;
  logic [LANES-1:0] lane_start;
  logic [PW-1:0] pos;
  data_partition_controller dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int model_off = 0;     // offset of lane 0 of the next vector
  int exp_q [$];         // expected: {sample, idx, first, last}
  int n_sel = 0;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && sel_valid) begin
    int e;
    n_sel++;
    if (exp_q.size() == 0) chk(0, "unexpected selection");
    else begin
      e = exp_q.pop_front();
      chk(sel_sample == part_sample_t'(e & 8'hff) && int'(sel_idx) == ((e >> 8) & 8'hff)
          && sel_first == e[16] && sel_last == e[17],
          $sformatf("selection %h idx %0d f%0d l%0d, expected %h", sel_sample, sel_idx, sel_first, sel_last, e));
    end
  end

  initial begin
    int a;
    a = 0;
    for (int i = 0; i < LANES; i++) in_vec[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // inputs change on the falling edge, the block samples on the rising edge
    for (int v = 0; v < 600; v++) begin
      int k;
      @(negedge clk);
      if (v == 300) begin
        k = int'($urandom_range(N - 1, 1));
        shift    = PW'(k);
        realign  = 1;
        in_valid = 0;
        model_off = (model_off - k + N) % N;
        @(negedge clk);
        realign = 0;
      end
      for (int i = 0; i < LANES; i++) begin
        int off;
        off = (model_off + i) % N;
        in_vec[i] = part_sample_t'(8'(a + i));
        if (off % OMEGA == 0 && off < NSEL * OMEGA)
          exp_q.push_back(((a + i) & 255) | ((off / OMEGA) << 8) | ((off == 0) << 16) | ((off == (NSEL - 1) * OMEGA) << 17));
      end
      in_valid = 1;
      #0.1;
      for (int i = 0; i < LANES; i++)
        chk(lane_start[i] == (((model_off + i) % N) == 0), $sformatf("lane_start %0d at vector %0d", i, v));
      a += LANES;
      model_off = (model_off + LANES) % N;
      if ($urandom_range(1, 0) != 0) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    chk(exp_q.size() == 0, "all expected selections seen");
    chk(n_sel > 500, "selections made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
