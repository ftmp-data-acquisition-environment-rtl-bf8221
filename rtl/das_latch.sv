// das_latch: the time-slice register in front of the acquisition memory.
//
// On a `store` strobe it captures the 15 monitored bus lines as one DAS word
// (bit 15 = 0, bits 14..10 = P5..P1, bits 9..5 = R5..R1, bits 4..0 = T5..T1,
// the document's bit assignment) and holds it while the memory writes it:
// `wr` follows `store` by one clock, with `word` stable from that cycle until
// the next store.
module das_latch
  import das_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              store,
  input  logic [NLINES-1:0] lines,
  output das_word_t         word,
  output logic              wr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      wr   <= 1'b0;
    end else begin
      wr <= store;
      if (store) word <= {1'b0, lines};
    end
  end
endmodule
