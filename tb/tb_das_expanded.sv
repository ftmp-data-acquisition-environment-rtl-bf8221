// tb_das_expanded: the DAS built with the expanded 64K-word buffer
// (DEPTH = 65536), filled with the largest count the 16-bit word-count
// register can request (65535 words) from T1 traffic at 8 Mbit/s, then
// down-loaded at 400K words/s. Checks every word, the fill time (one word per
// bit time) and the down-load pace, and reports the sustained acquisition
// rate: words / (fill + down-load + 60 us of host command time).
`timescale 1ns / 1ps
module tb_das_expanded;
  import das_pkg::*;

  localparam int     DEPTH = 65536;
  localparam int     N     = 65535;
  localparam int     CELL  = 8;
  localparam longint MS    = 64_000;

  logic clk = 0, rst_n = 0;
  logic [4:0] p_bus, c_bus, r_bus, t_bus;
  logic fn_valid, in_valid, out_valid, out_ready;
  das_fn_e fn;
  das_word_t in_data, out_data, csr;

  always #7.8125 clk = ~clk;

  das_top #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .p_bus, .c_bus, .r_bus, .t_bus, .fn_valid, .fn,
                                .in_valid, .in_data, .out_valid, .out_data, .out_ready, .csr);
  ftmp_bus_model bus (.clk, .p_bus, .c_bus, .r_bus, .t_bus);
  dma_host_model host (.clk, .fn_valid, .fn, .in_valid, .in_data, .out_valid, .out_data,
                       .out_ready, .csr);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (12_000_000) @(posedge clk);
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

  logic [9:0] cells[$];

  initial begin
    das_word_t tw = 16'h6D2B, sh = '0;
    int pos = -1, bad = 0;
    longint t_hit, t_rdy, fill, dl;
    bit ok;
    real rate;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (4) step();
    host.load(SEL_T1, tw, 16'(N));
    host.command(FN_START);
    for (int i = 0; i < 40; i++) cells.push_back(10'($urandom));
    for (int i = 15; i >= 0; i--) begin
      logic [9:0] c = 10'($urandom);
      c[0] = tw[i];
      cells.push_back(c);
    end
    for (int i = 0; i < N + 40; i++) cells.push_back(10'($urandom));
    foreach (cells[j]) begin
      sh = {sh[14:0], cells[j][0]};
      if (pos < 0 && j >= 15 && sh == tw) pos = j;
    end
    foreach (cells[j]) bus.tr_q.push_back(cells[j]);
    while (!csr[CSR_ACQ] && cyc < 100_000) step();
    t_hit = cyc;
    while (!csr[CSR_READY] && cyc - t_hit < 2 * longint'(N) * CELL) step();
    t_rdy = cyc;
    fill = t_rdy - t_hit;
    chk(csr[CSR_READY], "ready after 65535 words");
    chk(fill >= longint'(N) * CELL - CELL && fill <= longint'(N) * CELL + CELL,
        $sformatf("fill took %0d clocks (expect %0d)", fill, N * CELL));
    host.read_data(N, 12_000_000, ok);
    chk(ok && host.got.size() == N, $sformatf("%0d words down-loaded", host.got.size()));
    for (int k = 0; k < N && k < host.got.size(); k++)
      if (host.got[k] !== {6'b0, cells[pos + 1 + k]}) bad++;
    chk(bad == 0, $sformatf("word contents (%0d wrong)", bad));
    dl = host.last_cyc - host.first_cyc;
    chk(dl == longint'(N - 1) * 160, $sformatf("down-load pace: %0d clocks", dl));
    rate = real'(N) / ((real'(fill + dl + 160) / 64.0e6) + 60.0e-6);
    $display("fill %0.3f ms, down-load %0.3f ms, sustained %0.1f K words/s",
             real'(fill) / real'(MS), real'(dl + 160) / real'(MS), rate / 1000.0);
    chk(rate > 375.0e3, "sustained rate above 375K words/s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
