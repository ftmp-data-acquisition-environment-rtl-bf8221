// c_bus_voter: 3-of-5 majority vote of the five C bus clock lines.
//
// The five C busses carry the same phase-locked 1 MHz square wave. The
// FTMP-to-DAS interface votes them into one clock, C, which samples the NRZ
// P bus lines. The document says the lines are voted; the 3-of-5 majority is
// this design's choice, which masks any two stuck or broken lines.
// Purely combinational: c_out follows c_in with no clock.
module c_bus_voter (
  input  logic [4:0] c_in,
  output logic       c_out
);
  always_comb begin
    int unsigned ones;
    ones = 0;
    for (int i = 0; i < 5; i++) ones += int'(c_in[i]);
    c_out = (ones >= 3);
  end
endmodule
