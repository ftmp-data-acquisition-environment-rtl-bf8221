// pwdm: pulse-width demodulator for one FTMP T or R bus line.
//
// The T and R busses send 8 Mbit/s serial data as pulse-width modulated
// pulses; the DAS needs a data bit and a bit clock from each line. The
// document gives only that function. This design assumes each 125 ns bit
// cell starts with a rising edge and that a long pulse (about 3/4 cell) is a
// 1 and a short pulse (about 1/4 cell) a 0. Running at SPB system clocks per
// cell, the demodulator notes each rising edge and looks at the line again
// THRESH clocks later, in mid-cell: still high means 1, low means 0. It then
// updates `data` and, one clock later, raises `bclk` for two clocks. Because
// the decision is a fixed time after the cell start, the recovered clocks of
// lines whose cells are aligned rise together whatever bits they carry. The
// recovered clock is idle while the line carries no pulses.
//
// Timing: rising edge sampled in clock r; `data` valid from clock r+THRESH+1;
// `bclk` high in clocks r+THRESH+2 and r+THRESH+3. THRESH must be below SPB.
// Input must already be synchronized.
module pwdm #(
  parameter int unsigned SPB    = 8,   // system clocks per bit cell
  parameter int unsigned THRESH = 4    // high samples that make a 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pwm,
  output logic data,
  output logic bclk
);
  localparam int unsigned CW = $clog2(SPB + 1);

  logic          pwm_d;
  logic [CW-1:0] since;    // clocks since the rising edge, 0 = not in a cell
  logic [1:0]    pulse;    // bclk shaping

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_d <= 1'b0;
      since <= '0;
      data  <= 1'b0;
      pulse <= '0;
      bclk  <= 1'b0;
    end else begin
      pwm_d <= pwm;
      pulse <= {pulse[0], 1'b0};
      if (pwm && !pwm_d && since == '0) begin
        since <= CW'(1);
      end else if (since == CW'(THRESH)) begin
        // Mid-cell decision: a long pulse is still high.
        data  <= pwm;
        pulse <= 2'b01;
        since <= '0;
      end else if (since != '0) begin
        since <= since + 1'b1;
      end
      bclk <= pulse[0] | pulse[1];
    end
  end
endmodule
