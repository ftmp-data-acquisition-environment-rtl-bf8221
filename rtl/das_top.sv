// das_top: FTMP system bus data acquisition system (DAS).
//
// The DAS watches the 20 lines of the FTMP redundant serial system bus
// (5 P, 5 C, 5 R, 5 T), waits for a user-chosen 16-bit trigger word on one
// user-chosen line, then stores a user-chosen number of time slices of the
// 15 data lines into a local buffer and offers them to the host's DMA
// controller. Each stored 16-bit word is one sample of every line at once
// (bit 15 unused, 14..10 P5..P1, 9..5 R5..R1, 4..0 T5..T1), so 16 words hold
// one 16-bit FTMP word from each of up to 15 busses.
//
// Front end (the document's FTMP-DAS interface): the five phase-locked C
// lines are majority-voted into one 1 MHz clock C that samples the NRZ P
// lines; each pulse-width modulated 8 MHz T and R line goes through a
// demodulator that recovers its data bit and bit clock. Back end (the DAS
// board): the selection code picks a trigger line and its paired clock, the
// trigger circuit looks for the trigger word, and once it is found every
// rising edge of the selected clock latches all 15 lines and writes them to
// the buffer until the word count is reached; then csr bit 10 rises.
//
// Departures that are this design's own: everything runs on one system clock
// `clk` (64 MHz assumed: SPB = 8 samples per 125 ns T/R bit) with 2-flop
// synchronizers on the raw lines, and bus clock edges are detected rather
// than used as clocks; the PWM format, the majority vote, the host handshake
// and the function encoding are assumptions. The analog receivers and the
// UNIBUS DMA controller are outside this module: the host port below is what
// the DMA controller would drive.
//
// Host port timing: see das_control. Latency from a bus sampling edge to the
// memory write is 3 to 4 system clocks (synchronizer, edge detect, latch).
module das_top
  import das_pkg::*;
#(
  parameter int unsigned DEPTH      = 8192,  // local buffer words
  parameter int unsigned SPB        = 8,     // system clocks per T/R bit cell
  parameter int unsigned PWM_THRESH = 4      // high samples that decode as 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // FTMP system bus, raw digital levels; index 0 is bus 1.
  input  logic [4:0]  p_bus,
  input  logic [4:0]  c_bus,
  input  logic [4:0]  r_bus,
  input  logic [4:0]  t_bus,
  // Host DMA controller side.
  input  logic        fn_valid,
  input  das_fn_e     fn,
  input  logic        in_valid,
  input  das_word_t   in_data,
  output logic        out_valid,
  output das_word_t   out_data,
  input  logic        out_ready,
  output das_word_t   csr
);
  // ---- FTMP-DAS interface -------------------------------------------------
  logic       c_voted, c_s;
  logic [4:0] p_s, r_s, t_s;
  logic [4:0] r_data, r_clk, t_data, t_clk;

  c_bus_voter u_voter (.c_in(c_bus), .c_out(c_voted));

  sync_2ff #(.W(16)) u_sync (
    .clk, .rst_n,
    .d({c_voted, p_bus, r_bus, t_bus}),
    .q({c_s,     p_s,   r_s,   t_s})
  );

  for (genvar i = 0; i < 5; i++) begin : g_pwdm
    pwdm #(.SPB(SPB), .THRESH(PWM_THRESH)) u_r (
      .clk, .rst_n, .pwm(r_s[i]), .data(r_data[i]), .bclk(r_clk[i]));
    pwdm #(.SPB(SPB), .THRESH(PWM_THRESH)) u_t (
      .clk, .rst_n, .pwm(t_s[i]), .data(t_data[i]), .bclk(t_clk[i]));
  end

  // ---- DAS board ------------------------------------------------------------
  logic [NLINES-1:0] lines;
  logic [NCLKS-1:0]  clks;
  assign lines = {p_s, r_data, t_data};
  assign clks  = {c_s, r_clk, t_clk};

  sel_code_t   sel;
  das_word_t   trig_word, latch_word;
  logic [15:0] count;
  logic        trig_data, sclk, sample, store, latch_wr;
  logic        armed, acquiring, clr, trig_hit, full, rd_next, rd_empty;

  trigger_mux u_mux (.sel, .lines, .clks, .data(trig_data), .sclk);

  sample_gate u_gate (
    .clk, .rst_n, .sclk, .enable(acquiring && !full), .sample, .store);

  trigger_circuit u_trig (
    .clk, .rst_n, .clr, .armed, .sample, .din(trig_data), .trig_word,
    .hit(trig_hit));

  das_latch u_latch (
    .clk, .rst_n, .store, .lines, .word(latch_word), .wr(latch_wr));

  das_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .clr, .wr(latch_wr), .wdata(latch_word), .count, .full,
    .rd_next, .rdata(out_data), .rd_empty);

  das_control u_ctl (
    .clk, .rst_n, .fn_valid, .fn, .in_valid, .in_data, .trig_hit, .full,
    .rd_empty, .out_ready, .sel, .trig_word, .count, .armed, .acquiring, .clr,
    .rd_next, .out_valid, .csr, .state());
endmodule
