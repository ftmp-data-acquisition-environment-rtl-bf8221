// tb_trigger_circuit: trigger word search against a software model.
// Feeds random bits with the trigger word planted in the stream, with random
// gaps between strobes, and compares `hit` (one clock after the strobe)
// against a model that keeps the last 16 bits MSB first and ignores matches
// before 16 bits have arrived since the last clear. Also checks that a clear
// really restarts the 16-bit count and that nothing fires when not armed.
module tb_trigger_circuit;
  import das_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, armed = 0, sample = 0, din = 0;
  das_word_t trig_word;
  logic hit;
  int checks = 0, failures = 0, nhits = 0;

  trigger_circuit dut (.clk, .rst_n, .clr, .armed, .sample, .din, .trig_word, .hit);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] mreg;
  int          mcnt;

  task automatic strobe(input logic b, input logic arm);
    logic exp;
    armed <= arm; sample <= 1; din <= b;
    @(posedge clk);
    sample <= 0;
    exp = 0;
    if (arm) begin
      mreg = {mreg[14:0], b};
      if (mcnt < 16) mcnt++;
      exp = (mcnt >= 16) && (mreg == trig_word);
    end
    #1;   // hit is registered at the strobe edge
    checks++;
    if (hit !== exp) begin failures++; $display("FAIL hit %b exp %b reg %h", hit, exp, mreg); end
    if (hit) nhits++;
    repeat ($urandom % 3) @(posedge clk);
  endtask

  task automatic do_clr();
    clr <= 1; @(posedge clk); clr <= 0;
    mreg = 0; mcnt = 0;
  endtask

  initial begin
    trig_word = 16'hAAAA;
    mreg = 0; mcnt = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // First 15 bits of a match cannot fire; bit 16 does.
    for (int i = 15; i >= 0; i--) strobe(trig_word[i], 1);
    // Random streams with planted words and random trigger words.
    for (int r = 0; r < 40; r++) begin
      trig_word = (r % 3 == 0) ? 16'hAAAA : 16'($urandom);
      do_clr();
      for (int i = 0; i < 20 + ($urandom % 40); i++) strobe(1'($urandom), 1);
      for (int i = 15; i >= 0; i--) strobe(trig_word[i], 1);
      for (int i = 0; i < 5; i++) strobe(1'($urandom), 1);
    end
    // Not armed: no hit, no shifting.
    do_clr();
    for (int k = 0; k < 2; k++) for (int i = 15; i >= 0; i--) strobe(trig_word[i], 0);
    // Clear in the middle restarts the count.
    do_clr();
    for (int i = 15; i >= 8; i--) strobe(trig_word[i], 1);
    do_clr();
    for (int i = 7; i >= 0; i--) strobe(trig_word[i], 1);
    checks++;
    if (nhits < 40) begin failures++; $display("FAIL only %0d hits", nhits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
