// tb_das_latch: capture and hold of one time slice.
// Drives random lines and store strobes; checks that `wr` follows `store`
// by one clock, that `word` is {0, lines at the strobe} and that it holds
// while the lines keep changing between strobes.
module tb_das_latch;
  import das_pkg::*;
  logic clk = 0, rst_n = 0, store = 0;
  logic [14:0] lines = '0;
  das_word_t word;
  logic wr;
  das_word_t expw = '0;
  int checks = 0, failures = 0;

  das_latch dut (.clk, .rst_n, .store, .lines, .word, .wr);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic st;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      st = ($urandom % 3 == 0);
      store = st; lines = 15'($urandom);
      @(posedge clk);
      if (st) expw = {1'b0, lines};
      #1;
      checks += 2;
      if (wr !== st) begin failures++; $display("FAIL wr %b exp %b", wr, st); end
      if (word !== expw) begin failures++; $display("FAIL word %h exp %h", word, expw); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
