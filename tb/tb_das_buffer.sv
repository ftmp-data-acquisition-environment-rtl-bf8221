// tb_das_buffer: sequential write, count compare and sequential read.
// Runs with DEPTH = 64. For a set of word counts (0, 1, ordinary, DEPTH and
// above DEPTH, which is clamped) it writes random words until `full`, checks
// that `full` rises after exactly min(count, DEPTH) writes and that writes
// past it are dropped, then reads everything back in order through the
// one-clock read port and checks `rd_empty` at the end.
module tb_das_buffer;
  import das_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd_next = 0;
  das_word_t wdata = '0, rdata;
  logic [15:0] count = '0;
  logic full, rd_empty;
  das_word_t model[$];
  int checks = 0, failures = 0;

  das_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clr, .wr, .wdata, .count, .full,
                                   .rd_next, .rdata, .rd_empty);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    int lim = (n > DEPTH) ? DEPTH : n;
    int nw = 0;
    model.delete();
    count <= 16'(n);
    clr <= 1; @(posedge clk); clr <= 0; @(posedge clk);
    // Write until full, plus a few extra that must be ignored.
    while (nw < lim + 3) begin
      #1;
      checks++;
      if (full !== (nw >= lim)) begin failures++; $display("FAIL n=%0d full=%b after %0d", n, full, nw); end
      wr <= 1; wdata <= 16'($urandom);
      @(posedge clk);
      if (nw < lim) model.push_back(wdata);
      wr <= 0; nw++;
      repeat ($urandom % 2) @(posedge clk);
    end
    // Read back.
    @(posedge clk);
    for (int i = 0; i < lim; i++) begin
      #1;
      checks += 2;
      if (rd_empty) begin failures++; $display("FAIL n=%0d empty at %0d", n, i); end
      if (rdata !== model[i]) begin failures++; $display("FAIL n=%0d word %0d %h exp %h", n, i, rdata, model[i]); end
      rd_next <= 1; @(posedge clk); rd_next <= 0; @(posedge clk);
    end
    #1;
    checks++;
    if (!rd_empty) begin failures++; $display("FAIL n=%0d not empty", n); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(0); run(1); run(5); run(37); run(DEPTH); run(DEPTH + 10); run(16'hFFFF); run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
