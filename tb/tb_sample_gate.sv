// tb_sample_gate: edge strobe and AND gating against a reference.
// Drives a random slow clock and a random enable, and checks that `sample`
// is high exactly in the cycle a rising edge is first seen and that `store`
// is sample AND enable. Also counts that strobes and stores both happened.
module tb_sample_gate;
  logic clk = 0, rst_n = 0, sclk = 0, enable = 0;
  logic sample, store;
  logic prev = 0;
  int checks = 0, failures = 0, nsample = 0, nstore = 0;

  sample_gate dut (.clk, .rst_n, .sclk, .enable, .sample, .store);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom % 4 == 0) sclk = ~sclk;
      if ($urandom % 16 == 0) enable = ~enable;
      #1;
      checks++;
      if (sample !== (sclk && !prev) || store !== (sclk && !prev && enable)) begin
        failures++; $display("FAIL cycle %0d sclk %b prev %b en %b -> %b %b", i, sclk, prev, enable, sample, store);
      end
      if (sample) nsample++;
      if (store) nstore++;
      @(posedge clk);
      prev = sclk;
    end
    checks++;
    if (nsample == 0 || nstore == 0 || nstore == nsample) begin
      failures++; $display("FAIL coverage %0d %0d", nsample, nstore);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
