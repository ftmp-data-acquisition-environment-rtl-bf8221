// sync_2ff: two-flop synchronizer for a bundle of asynchronous lines.
//
// The FTMP bus lines are asynchronous to the DAS system clock, so every raw
// line passes two flip-flops before any logic looks at it. Output follows the
// input two clock cycles later. Synchronizers are this design's own addition;
// the original board clocked its latch directly from the bus clocks.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
