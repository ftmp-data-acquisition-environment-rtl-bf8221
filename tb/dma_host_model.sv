// dma_host_model: behavioural stand-in for the host's UNIBUS DMA controller
// and driver, for testbenches only.
//
// Issues DAS functions (one-clock fn_valid strobe), writes the three control
// words of a parameter load (trigger line code, trigger word, word count) and
// down-loads data words at the document's 400K words/s: one word every
// WORD_CYCLES system clocks (160 at 64 MHz = 2.5 us). Received words are
// kept in `got` with the clock count of the first and last word.
module dma_host_model
  import das_pkg::*;
#(
  parameter int unsigned WORD_CYCLES = 160
) (
  input  logic      clk,
  output logic      fn_valid,
  output das_fn_e   fn,
  output logic      in_valid,
  output das_word_t in_data,
  input  logic      out_valid,
  input  das_word_t out_data,
  output logic      out_ready,
  input  das_word_t csr
);
  das_word_t   got[$];
  longint      cyc = 0;
  longint      first_cyc, last_cyc;

  initial begin
    fn_valid = 0; fn = FN_RESET; in_valid = 0; in_data = '0; out_ready = 0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // All driving happens 1 time unit after a clock edge, away from the DUT's
  // own updates; every call returns at that same point.
  task automatic step();
    @(posedge clk); #1;
  endtask

  task automatic command(input das_fn_e f);
    fn_valid = 1; fn = f;
    step();
    fn_valid = 0;
  endtask

  task automatic load(input sel_code_t s, input das_word_t w, input logic [15:0] n);
    command(FN_LOAD);
    for (int i = 0; i < 3; i++) begin
      in_valid = 1;
      in_data  = (i == 0) ? das_word_t'(s) : (i == 1) ? w : n;
      step();
    end
    in_valid = 0;
  endtask

  // Down-load n words at the DMA rate; gives up after `limit` clocks.
  task automatic read_data(input int n, input longint limit, output bit ok);
    longint t0, t_next;
    got.delete();
    command(FN_READ);
    t0 = cyc; t_next = cyc; ok = 1;
    for (int i = 0; i < n; i++) begin
      while (cyc < t_next || !out_valid) begin
        step();
        if (cyc - t0 > limit) begin ok = 0; return; end
      end
      if (i == 0) first_cyc = cyc;
      last_cyc = cyc;
      got.push_back(out_data);
      out_ready = 1;
      step();
      out_ready = 0;
      t_next = first_cyc + longint'(i + 1) * WORD_CYCLES;
    end
  endtask
endmodule
