// Unit test of sample_registers: after every shift, tail_out must equal the
// sample pushed DEPTH shifts earlier (zero before that), and after DEPTH
// consecutive shifts taps[l] must be the l-th of them. clear zeroes all.
module tb_sample_registers;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  part_sample_t din = '0, tail_out;
  part_sample_t taps [NSEL];
  sample_registers dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  part_sample_t hist [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 400; k++) begin
      part_sample_t s, e;
      s = part_sample_t'($urandom);
      e = (hist.size() >= NSEL) ? hist[hist.size() - NSEL] : '0;
      #0.1;
      chk(tail_out == e, $sformatf("tail at shift %0d", k));
      din <= s; shift <= 1;
      hist.push_back(s);
      @(posedge clk);
      shift <= 0;
      if ($urandom_range(1, 0) != 0) @(posedge clk);   // idle cycle: must hold
    end
    #0.1;
    for (int l = 0; l < NSEL; l++)
      chk(taps[l] == hist[hist.size() - NSEL + l], $sformatf("tap %0d", l));
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    #0.1;
    for (int l = 0; l < NSEL; l++) chk(taps[l] == '0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
