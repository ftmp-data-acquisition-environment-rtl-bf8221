// trigger_circuit: serial search for the 16-bit trigger word.
//
// While `armed`, every sampling strobe shifts the selected bus line into a
// 16-bit shift register, first-received bit ending up in bit 15 (bit order is
// this design's assumption). When the register, including the bit just
// shifted in, equals `trig_word`, `hit` pulses for one clock, registered one
// clock after the strobe. A match only counts after 16 bits have been shifted
// in since the last `clr`, so bits left from an earlier search cannot fire it.
// `clr` (start or reset) empties the register.
module trigger_circuit
  import das_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       armed,
  input  logic       sample,
  input  logic       din,
  input  das_word_t  trig_word,
  output logic       hit
);
  logic [14:0] shreg;   // the 15 bits before the current one
  logic [4:0] nbits;     // bits shifted in, saturates at 16
  das_word_t  next;

  assign next = {shreg, din};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      nbits <= '0;
      hit   <= 1'b0;
    end else if (clr) begin
      shreg <= '0;
      nbits <= '0;
      hit   <= 1'b0;
    end else begin
      hit <= 1'b0;
      if (armed && sample) begin
        shreg <= next[14:0];
        if (nbits != 5'd16) nbits <= nbits + 5'd1;
        hit <= (nbits >= 5'd15) && (next == trig_word);
      end
    end
  end
endmodule
