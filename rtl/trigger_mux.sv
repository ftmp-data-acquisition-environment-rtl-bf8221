// trigger_mux: picks the trigger line and its paired sampling clock.
//
// One 4-bit selection code chooses both the data line searched for the
// trigger word and the clock that samples it, so a line can never be paired
// with the wrong clock. The code is the line's bit number in the DAS word
// (document, Figure 6): 0..4 = T1..T5 with T1C..T5C, 5..9 = R1..R5 with
// R1C..R5C, 10..14 = P1..P5 with the voted C clock. Code 15 is unused; this
// design returns constant 0 on both outputs for it, so the DAS never triggers.
// Purely combinational.
module trigger_mux
  import das_pkg::*;
(
  input  sel_code_t          sel,
  input  logic [NLINES-1:0]  lines,   // DAS word bits 14..0
  input  logic [NCLKS-1:0]   clks,    // {C, R5C..R1C, T5C..T1C}
  output logic               data,
  output logic               sclk
);
  always_comb begin
    int unsigned ci;
    ci   = clk_of_sel(sel);
    data = (sel != SEL_NONE) ? lines[sel] : 1'b0;
    sclk = (ci < NCLKS) ? clks[ci] : 1'b0;
  end
endmodule
