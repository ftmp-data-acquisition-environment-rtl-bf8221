// sample_gate: sampling-edge strobe and the trigger AND gate.
//
// The selected sampling clock (a recovered T/R bit clock or the voted C
// clock) is a slow signal in the system clock domain. This block registers it
// and emits `sample`, a one-system-clock strobe at each rising edge. `store`
// is `sample` AND `enable`: the document's AND gate that lets the sampling
// clock reach the latch and memory only once the trigger word has been found.
// Both outputs are combinational from the current `sclk` and its registered
// copy, so they appear in the same cycle as the rising edge is seen.
module sample_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic sclk,
  input  logic enable,
  output logic sample,
  output logic store
);
  logic sclk_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sclk_d <= 1'b0;
    else        sclk_d <= sclk;
  end

  assign sample = sclk & ~sclk_d;
  assign store  = sample & enable;
endmodule
