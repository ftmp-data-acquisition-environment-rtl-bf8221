// ftmp_bus_model: behavioural model of the FTMP redundant system bus lines,
// for testbenches only (not synthesizable).
//
// Produces the 20 lines the DAS monitors, in steps of the DAS system clock
// (64 MHz assumed): five C lines carrying the same 1 MHz square wave (high
// for the first 32 clocks of each 64-clock period), five NRZ P lines that
// change at the C falling edge and so are stable at the C rising edge, and
// five T plus five R lines that send 8 Mbit/s pulse-width modulated bits in
// 8-clock cells (a 1 is 6 clocks high, a 0 is 2 clocks high; idle low).
// All ten T/R lines share cur_cell timing. The testbench queues one 10-bit cur_cell
// ({R5..R1, T5..T1}) per T/R bit time and one 5-bit P vector per C period;
// an empty queue leaves T/R idle and P low. Up to two C lines can be forced
// to a stuck level to exercise the voter, and each T line can be delayed by
// up to 31 system clocks (`t_skew`) to model skew inside a bus triad.
module ftmp_bus_model (
  input  logic       clk,
  output logic [4:0] p_bus,
  output logic [4:0] c_bus,
  output logic [4:0] r_bus,
  output logic [4:0] t_bus
);
  logic [9:0] tr_q[$];
  logic [4:0] p_q[$];
  logic [4:0] c_stuck_mask = '0;
  logic [4:0] c_stuck_val  = '0;
  int unsigned t_skew[5]    = '{default: 0};
  logic [4:0] t_hist[32];        // undelayed T levels, newest first

  int unsigned cyc   = 0;
  logic [9:0]  cur_cell  = '0;
  logic        cur_on = 1'b0;
  int unsigned ncells = 0;   // T/R cells sent

  initial begin
    p_bus = '0; c_bus = '0; r_bus = '0; t_bus = '0;
    foreach (t_hist[j]) t_hist[j] = '0;
  end

  function automatic int pending_tr();
    return tr_q.size();
  endfunction

  always @(posedge clk) begin
    int unsigned ph, cp;
    logic c;
    cyc <= cyc + 1;
    cp = cyc % 64;
    ph = cyc % 8;
    // C busses.
    c = (cp < 32);
    c_bus <= (({5{c}}) & ~c_stuck_mask) | (c_stuck_val & c_stuck_mask);
    // P busses change at the C falling edge.
    if (cp == 32) p_bus <= (p_q.size() != 0) ? p_q.pop_front() : 5'b0;
    // T/R busses: new cur_cell at phase 0.
    if (ph == 0) begin
      cur_on = (tr_q.size() != 0);
      if (cur_on) begin cur_cell = tr_q.pop_front(); ncells++; end
    end
    for (int j = 31; j > 0; j--) t_hist[j] = t_hist[j - 1];
    for (int i = 0; i < 5; i++) t_hist[0][i] = cur_on && (ph < (cur_cell[i] ? 6 : 2));
    for (int i = 0; i < 5; i++) begin
      t_bus[i] <= t_hist[t_skew[i]][i];
      r_bus[i] <= cur_on && (ph < (cur_cell[5 + i] ? 6 : 2));
    end
  end
endmodule
