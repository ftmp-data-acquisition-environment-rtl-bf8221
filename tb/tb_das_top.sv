// tb_das_top: end-to-end test of the data acquisition system at its default
// size (8192-word buffer), driven through an FTMP bus model and a DMA host
// model. Also serves as the full-size run: scenario 1 fills and down-loads
// the whole buffer.
//
//  1. Trigger on T1, word count 8192: checks start latency (< 200 ns), that
//     the buffer fills at the 8 MHz bit rate (8192 words in 1.024 ms), every
//     down-loaded word against a model of the bus traffic, the 400K words/s
//     down-load rate, the resulting sustained rate (about 380K words/s) and
//     that the ready flag (csr bit 10) clears afterwards.
//  2. Trigger on P2 with the voted C clock while two of the five C lines are
//     stuck; a START issued during the down-load re-arms the DAS afterwards.
//  3. RESET while armed, new parameters loaded, trigger on R3 with idle gaps
//     between bus words.
//  4. Word count 0xFFFF, clamped to the 8192-word buffer, then RESET with
//     data waiting.
//  5. RESET in the middle of an acquisition, then START without reloading:
//     the control registers survive (trigger word AAAA on T1, 50 words).
//  6. T2 delayed by one bit time and T3 by two on the bus: sampled with the
//     T1 clock, the stored words show T2 one bit and T3 two bits late.
// Expected words are computed from the traffic the testbench queued: the
// trigger position is found by scanning the selected line's bit stream, and
// word k is the slice of all lines at the (k+1)-th sample after it.
`timescale 1ns / 1ps
module tb_das_top;
  import das_pkg::*;

  localparam int DEPTH = 8192;        // das_top default
  localparam int CELL  = 8;           // system clocks per T/R bit
  localparam int CPER  = 64;          // system clocks per C period

  logic clk = 0, rst_n = 0;
  logic [4:0] p_bus, c_bus, r_bus, t_bus;
  logic fn_valid, in_valid, out_valid, out_ready;
  das_fn_e fn;
  das_word_t in_data, out_data, csr;

  always #7.8125 clk = ~clk;          // 64 MHz

  das_top dut (.clk, .rst_n, .p_bus, .c_bus, .r_bus, .t_bus, .fn_valid, .fn, .in_valid,
               .in_data, .out_valid, .out_data, .out_ready, .csr);

  ftmp_bus_model bus (.clk, .p_bus, .c_bus, .r_bus, .t_bus);

  dma_host_model host (.clk, .fn_valid, .fn, .in_valid, .in_data, .out_valid, .out_data,
                       .out_ready, .csr);

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_trig_t = 0, n_trig_r = 0, n_trig_p = 0, n_voter_mask = 0, n_ready = 0,
      n_download = 0, n_clamp = 0, n_reset_mid = 0, n_pending = 0, n_reload = 0,
      n_gaps = 0, n_skew = 0;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (csr %h)", what, csr); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  task automatic wait_csr(input int b, input logic v, input longint limit, output longint t);
    longint t0 = cyc;
    while (csr[b] !== v && cyc - t0 < limit) step();
    t = cyc - t0;
  endtask

  // ---- traffic generation and reference model ----
  logic [9:0] cells[$];     // T/R cells queued in this scenario
  logic [4:0] pvecs[$];     // P vectors queued in this scenario
  logic [9:0] last_tr = '0; // last T/R cell ever sent (held by demodulators)

  task automatic push_cell(input logic [9:0] c);
    cells.push_back(c); bus.tr_q.push_back(c); last_tr = c;
  endtask

  // n random T/R cells in 16-bit words, optional idle gap after each word.
  task automatic tr_random(input int n, input bit gaps);
    for (int i = 0; i < n; i++) begin
      push_cell(10'($urandom));
      if (gaps && i % 16 == 15) begin
        // An empty queue at a cell boundary leaves the lines idle; wait it out.
        while (bus.tr_q.size() != 0) step();
        repeat (CELL * (1 + $urandom % 4)) step();
        n_gaps++;
      end
    end
  endtask

  task automatic tr_trigger(input int line, input das_word_t w);
    for (int i = 15; i >= 0; i--) begin
      logic [9:0] c = 10'($urandom);
      c[line] = w[i];
      push_cell(c);
    end
  endtask

  // First position (index of last bit) where the 16-bit window matches.
  function automatic int scan(input logic bits[$], input das_word_t w);
    das_word_t sh = '0;
    for (int j = 0; j < bits.size(); j++) begin
      sh = {sh[14:0], bits[j]};
      if (j >= 15 && sh == w) return j;
    end
    return -1;
  endfunction

  function automatic int tr_trigger_pos(input int line, input das_word_t w);
    logic b[$];
    foreach (cells[j]) b.push_back(cells[j][line]);
    return scan(b, w);
  endfunction

  // Compare the down-loaded words with the T/R model (P lines low).
  task automatic check_tr_words(input int pos, input int n, input string tag);
    int bad = 0;
    chk(host.got.size() == n, $sformatf("%s: %0d words down-loaded (want %0d)", tag, host.got.size(), n));
    for (int k = 0; k < n && k < host.got.size(); k++) begin
      das_word_t e = {6'b0, cells[pos + 1 + k]};
      if (host.got[k] !== e) begin
        if (bad < 5) $display("  %s word %0d got %h exp %h", tag, k, host.got[k], e);
        bad++;
      end
    end
    chk(bad == 0, $sformatf("%s: word contents (%0d wrong)", tag, bad));
  endtask

  task automatic start_and_check_latency(input string tag);
    longint t;
    host.command(FN_START);
    wait_csr(CSR_ARMED, 1'b1, 100, t);
    // < 200 ns = 12.8 clocks at 64 MHz; the command strobe itself is clock 0.
    chk(csr[CSR_ARMED] && t <= 12, $sformatf("%s: armed %0d clocks after START", tag, t + 1));
  endtask

  // ---- scenarios ----
  task automatic scenario1();
    longint t_hit, t_rdy, t;
    bit ok;
    int pos;
    real rate;
    das_word_t tw = 16'hC3A5;
    cells.delete();
    host.load(SEL_T1, tw, 16'(DEPTH)); n_reload++;
    start_and_check_latency("S1");
    tr_random(64, 0);
    tr_trigger(0, tw);
    tr_random(DEPTH + 64, 0);
    pos = tr_trigger_pos(0, tw);
    wait_csr(CSR_ACQ, 1'b1, 100000, t);
    chk(csr[CSR_ACQ], "S1: trigger word found on T1");
    if (csr[CSR_ACQ]) n_trig_t++;
    t_hit = cyc;
    wait_csr(CSR_READY, 1'b1, 200000, t);
    t_rdy = cyc;
    chk(csr[CSR_READY], "S1: ready flag set");
    if (csr[CSR_READY]) n_ready++;
    // 8192 words at 8 MHz = 1.024 ms = 65536 clocks.
    chk((t_rdy - t_hit) >= DEPTH * CELL - CELL && (t_rdy - t_hit) <= DEPTH * CELL + CELL,
        $sformatf("S1: %0d words stored in %0d clocks (expect %0d)", DEPTH, t_rdy - t_hit, DEPTH * CELL));
    host.read_data(DEPTH, 64'd2_000_000, ok);
    chk(ok, "S1: down-load completed");
    check_tr_words(pos, DEPTH, "S1");
    // 400K words/s: one word per 160 clocks.
    chk(host.last_cyc - host.first_cyc == longint'(DEPTH - 1) * 160,
        $sformatf("S1: down-load took %0d clocks", host.last_cyc - host.first_cyc));
    // Sustained rate: words / (fill + down-load + ~60 us of host commands).
    rate = real'(DEPTH) / ((real'(t_rdy - t_hit + host.last_cyc - host.first_cyc + 160) / 64.0e6) + 60.0e-6);
    $display("S1: sustained acquisition rate %0.1f K words/s", rate / 1000.0);
    chk(rate > 375.0e3 && rate < 385.0e3, "S1: sustained rate near 380K words/s");
    wait_csr(CSR_READY, 1'b0, 20, t);
    chk(!csr[CSR_READY] && !csr[CSR_ARMED], "S1: ready flag cleared after down-load");
    if (ok) n_download++;
    while (bus.tr_q.size() != 0) step();
    repeat (4 * CELL) step();
  endtask

  task automatic scenario2();
    longint t;
    bit ok;
    int pos, bad = 0, n = 100;
    logic b[$];
    das_word_t tw = 16'h5A0F;
    pvecs.delete();
    bus.c_stuck_mask = 5'b10010; bus.c_stuck_val = 5'b10000;   // C5 stuck 1, C2 stuck 0
    host.load(4'd11, tw, 16'(n)); n_reload++;                   // P2 with C
    start_and_check_latency("S2");
    repeat (20 * CPER) step();                                  // idle P: zeros shifted in
    for (int i = 0; i < 16; i++) b.push_back(1'b0);
    for (int i = 0; i < 40 + n + 24; i++) begin
      logic [4:0] v = 5'($urandom);
      if (i >= 40 && i < 56) v[1] = tw[55 - i];
      pvecs.push_back(v); bus.p_q.push_back(v);
    end
    foreach (pvecs[j]) b.push_back(pvecs[j][1]);
    pos = scan(b, tw) - 16;
    wait_csr(CSR_READY, 1'b1, 200 * CPER, t);
    chk(csr[CSR_READY], "S2: P2 trigger found and words stored with voted C clock");
    if (csr[CSR_READY]) begin n_trig_p++; n_voter_mask++; n_ready++; end
    // Ask to start again while the data is still being down-loaded.
    fork
      host.read_data(n, 64'd100_000, ok);
      begin
        repeat (10 * 160) step();
        host.command(FN_START);
        chk(csr[CSR_PENDING], "S2: START during down-load remembered");
      end
    join
    chk(ok, "S2: down-load completed");
    chk(host.got.size() == n, "S2: word count");
    for (int k = 0; k < n && k < host.got.size(); k++) begin
      das_word_t e = {1'b0, pvecs[pos + 1 + k], last_tr};
      if (host.got[k] !== e) begin
        if (bad < 5) $display("  S2 word %0d got %h exp %h", k, host.got[k], e);
        bad++;
      end
    end
    chk(bad == 0, $sformatf("S2: word contents (%0d wrong)", bad));
    wait_csr(CSR_ARMED, 1'b1, 20, t);
    chk(csr[CSR_ARMED] && !csr[CSR_READY], "S2: re-armed as soon as the down-load ended");
    if (csr[CSR_ARMED]) n_pending++;
    if (ok) n_download++;
    bus.c_stuck_mask = '0;
    while (bus.p_q.size() != 0) step();
  endtask

  task automatic scenario3();
    longint t;
    bit ok;
    int pos, n = 300;
    das_word_t tw = 16'h9E37;
    // Still armed from scenario 2: reset it, then change the parameters.
    host.command(FN_RESET);
    step();
    chk(!csr[CSR_ARMED] && !csr[CSR_ACQ] && !csr[CSR_READY], "S3: reset while armed");
    cells.delete();
    host.load(4'd7, tw, 16'(n)); n_reload++;                   // R3 with R3C
    start_and_check_latency("S3");
    tr_random(48, 1);
    tr_trigger(7, tw);
    tr_random(n + 64, 1);
    pos = tr_trigger_pos(7, tw);
    wait_csr(CSR_READY, 1'b1, 100000, t);
    chk(csr[CSR_READY], "S3: R3 trigger found and words stored");
    if (csr[CSR_READY]) begin n_trig_r++; n_ready++; end
    host.read_data(n, 64'd100_000, ok);
    chk(ok, "S3: down-load completed");
    check_tr_words(pos, n, "S3");
    if (ok) n_download++;
    while (bus.tr_q.size() != 0) step();
    repeat (4 * CELL) step();
  endtask

  task automatic scenario4();
    longint t_hit, t;
    das_word_t tw = 16'h0FF1;
    cells.delete();
    host.load(4'd1, tw, 16'hFFFF); n_reload++;                  // T2, count above buffer
    start_and_check_latency("S4");
    tr_random(20, 0);
    tr_trigger(1, tw);
    tr_random(DEPTH + 200, 0);
    wait_csr(CSR_ACQ, 1'b1, 100000, t);
    t_hit = cyc;
    wait_csr(CSR_READY, 1'b1, 200000, t);
    chk(csr[CSR_READY] && (cyc - t_hit) <= DEPTH * CELL + CELL && (cyc - t_hit) >= DEPTH * CELL - CELL,
        $sformatf("S4: count 65535 stops at the %0d-word buffer (%0d clocks)", DEPTH, cyc - t_hit));
    if (csr[CSR_READY]) begin n_clamp++; n_trig_t++; end
    host.command(FN_RESET);
    step();
    chk(!csr[CSR_READY], "S4: reset with data waiting clears the ready flag");
    while (bus.tr_q.size() != 0) step();
    repeat (4 * CELL) step();
  endtask

  task automatic scenario5();
    longint t;
    bit ok;
    int pos, n = 50;
    das_word_t tw = 16'hAAAA;
    cells.delete();
    host.load(SEL_T1, tw, 16'(n)); n_reload++;
    start_and_check_latency("S5a");
    tr_random(30, 0);
    tr_trigger(0, tw);
    tr_random(20, 0);
    wait_csr(CSR_ACQ, 1'b1, 100000, t);
    repeat (5 * CELL) step();
    chk(csr[CSR_ACQ], "S5: acquiring before reset");
    host.command(FN_RESET);
    step();
    chk(!csr[CSR_ACQ] && !csr[CSR_ARMED], "S5: reset stops acquisition");
    if (!csr[CSR_ACQ]) n_reset_mid++;
    while (bus.tr_q.size() != 0) step();
    repeat (4 * CELL) step();
    // Start again with the same (kept) parameters.
    cells.delete();
    start_and_check_latency("S5b");
    tr_random(40, 0);
    tr_trigger(0, tw);
    tr_random(n + 40, 0);
    pos = tr_trigger_pos(0, tw);
    wait_csr(CSR_READY, 1'b1, 100000, t);
    chk(csr[CSR_READY], "S5: kept parameters trigger again");
    if (csr[CSR_READY]) begin n_trig_t++; n_ready++; end
    host.read_data(n, 64'd100_000, ok);
    check_tr_words(pos, n, "S5");
    if (ok) n_download++;
    while (bus.tr_q.size() != 0) step();
  endtask

  task automatic scenario6();
    longint t;
    bit ok;
    int pos, bad = 0, n = 200;
    das_word_t tw = 16'h3C96;
    cells.delete();
    bus.t_skew[1] = CELL; bus.t_skew[2] = 2 * CELL;
    host.load(SEL_T1, tw, 16'(n)); n_reload++;
    start_and_check_latency("S6");
    tr_random(40, 0);
    tr_trigger(0, tw);
    tr_random(n + 40, 0);
    pos = tr_trigger_pos(0, tw);
    wait_csr(CSR_READY, 1'b1, 100000, t);
    chk(csr[CSR_READY], "S6: trigger on T1 with skewed T2/T3");
    host.read_data(n, 64'd100_000, ok);
    chk(ok && host.got.size() == n, "S6: down-load completed");
    for (int k = 0; k < n && k < host.got.size(); k++) begin
      das_word_t e = {6'b0, cells[pos + 1 + k]};
      e[1] = cells[pos + k][1];          // T2 one bit late
      e[2] = cells[pos - 1 + k][2];      // T3 two bits late
      if (host.got[k] !== e) begin
        if (bad < 5) $display("  S6 word %0d got %h exp %h", k, host.got[k], e);
        bad++;
      end
    end
    chk(bad == 0, $sformatf("S6: skew visible in the stored words (%0d wrong)", bad));
    if (ok && bad == 0) n_skew++;
    while (bus.tr_q.size() != 0) step();
    repeat (4 * CELL) step();
    bus.t_skew[1] = 0; bus.t_skew[2] = 0;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (4) step();
    // A read with nothing acquired is ignored.
    host.command(FN_READ);
    repeat (4) step();
    chk(!out_valid && !csr[CSR_READY], "read ignored when no data is ready");
    scenario1();
    scenario2();
    scenario3();
    scenario4();
    scenario5();
    scenario6();
    $display("mechanisms: trig_T=%0d trig_R=%0d trig_P=%0d voter_mask=%0d ready=%0d download=%0d clamp=%0d reset_mid=%0d pending_start=%0d reload=%0d gaps=%0d skew=%0d",
             n_trig_t, n_trig_r, n_trig_p, n_voter_mask, n_ready, n_download, n_clamp,
             n_reset_mid, n_pending, n_reload, n_gaps, n_skew);
    chk(n_trig_t > 0, "mechanism: trigger on a T line");
    chk(n_trig_r > 0, "mechanism: trigger on an R line");
    chk(n_trig_p > 0, "mechanism: trigger on a P line");
    chk(n_voter_mask > 0, "mechanism: C vote masks failed lines");
    chk(n_ready > 0, "mechanism: ready flag");
    chk(n_download > 0, "mechanism: DMA down-load");
    chk(n_clamp > 0, "mechanism: count clamped to buffer size");
    chk(n_reset_mid > 0, "mechanism: reset during acquisition");
    chk(n_pending > 0, "mechanism: start during down-load");
    chk(n_reload > 1, "mechanism: parameter change");
    chk(n_gaps > 0, "mechanism: idle gaps on the T/R busses");
    chk(n_skew > 0, "mechanism: skew between T lines recorded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
