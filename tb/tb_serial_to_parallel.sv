// Unit test of serial_to_parallel: random samples with random gaps in
// in_valid; every output vector must hold the next four inputs in order,
// and out_valid must pulse exactly once per four accepted samples.
module tb_serial_to_parallel;
  import sync_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  adc_sample_t in_sample = '0;
  logic out_valid;
  adc_sample_t out_vec [LANES];
  serial_to_parallel dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  adc_sample_t sent [$];
  int n_in = 0, n_out = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    n_out++;
    for (int i = 0; i < LANES; i++) begin
      adc_sample_t e;
      e = sent.pop_front();
      checks++;
      if (out_vec[i] != e) begin
        failures++;
        $display("FAIL lane %0d: got %h expected %h", i, out_vec[i], e);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 2000; k++) begin
      if ($urandom_range(3, 0) != 0) begin
        adc_sample_t s;
        s = adc_sample_t'($urandom);
        in_sample <= s;
        in_valid  <= 1;
        sent.push_back(s);
        n_in++;
      end else in_valid <= 0;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != n_in / LANES) begin
      failures++;
      $display("FAIL: %0d vectors for %0d samples", n_out, n_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
