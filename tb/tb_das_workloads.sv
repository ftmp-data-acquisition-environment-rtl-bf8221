// tb_das_workloads: the DAS at its default size running the two small
// acquisition workloads of the original system, end to end through the FTMP
// bus model and the DMA host model.
//
//  1. Fault-effect experiment: about 150 bus words must be captured twice
//     every 40 ms. Sent serially on one T line that is 150 x 16 = 2400 DAS
//     words per capture. The testbench runs two captures back to back, the
//     second armed by a START given during the first down-load, checks every
//     word of both, and checks that each capture (trigger search, fill and
//     down-load at 400K words/s) completes in under 20 ms.
//  2. The example acquisition of the original host program: trigger word
//     AAAA on line code 0 (T1), 50 words.
`timescale 1ns / 1ps
module tb_das_workloads;
  import das_pkg::*;

  localparam int CELL = 8;
  localparam longint MS = 64_000;     // system clocks per millisecond

  logic clk = 0, rst_n = 0;
  logic [4:0] p_bus, c_bus, r_bus, t_bus;
  logic fn_valid, in_valid, out_valid, out_ready;
  das_fn_e fn;
  das_word_t in_data, out_data, csr;

  always #7.8125 clk = ~clk;

  das_top dut (.clk, .rst_n, .p_bus, .c_bus, .r_bus, .t_bus, .fn_valid, .fn, .in_valid,
               .in_data, .out_valid, .out_data, .out_ready, .csr);
  ftmp_bus_model bus (.clk, .p_bus, .c_bus, .r_bus, .t_bus);
  dma_host_model host (.clk, .fn_valid, .fn, .in_valid, .in_data, .out_valid, .out_data,
                       .out_ready, .csr);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (4_000_000) @(posedge clk);
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

  task automatic push_cell(input logic [9:0] c);
    cells.push_back(c); bus.tr_q.push_back(c);
  endtask

  // Random traffic on all T/R lines with the trigger word planted on T1.
  task automatic traffic(input int pre, input das_word_t tw, input int post);
    cells.delete();
    for (int i = 0; i < pre; i++) push_cell(10'($urandom));
    for (int i = 15; i >= 0; i--) begin
      logic [9:0] c = 10'($urandom);
      c[0] = tw[i];
      push_cell(c);
    end
    for (int i = 0; i < post; i++) push_cell(10'($urandom));
  endtask

  function automatic int trigger_pos(input das_word_t w);
    das_word_t sh = '0;
    foreach (cells[j]) begin
      sh = {sh[14:0], cells[j][0]};
      if (j >= 15 && sh == w) return j;
    end
    return -1;
  endfunction

  task automatic check_words(input int pos, input int n, input string tag);
    int bad = 0;
    chk(host.got.size() == n, $sformatf("%s: %0d words (want %0d)", tag, host.got.size(), n));
    for (int k = 0; k < n && k < host.got.size(); k++)
      if (host.got[k] !== {6'b0, cells[pos + 1 + k]}) bad++;
    chk(bad == 0, $sformatf("%s: word contents (%0d wrong)", tag, bad));
  endtask

  task automatic wait_flag(input int b, input logic v, input longint limit);
    longint t0 = cyc;
    while (csr[b] !== v && cyc - t0 < limit) step();
  endtask

  task automatic fault_effect_experiment();
    localparam int N = 150 * 16;
    das_word_t tw = 16'hE71B;
    longint t_start, t_end;
    int pos;
    bit ok;
    host.load(SEL_T1, tw, 16'(N));
    host.command(FN_START);
    t_start = cyc;
    for (int rep = 0; rep < 2; rep++) begin
      wait_flag(CSR_ARMED, 1'b1, 100);
      chk(csr[CSR_ARMED], $sformatf("capture %0d: armed", rep));
      traffic(100, tw, N + 50);
      pos = trigger_pos(tw);
      wait_flag(CSR_READY, 1'b1, 2 * MS);
      chk(csr[CSR_READY], $sformatf("capture %0d: %0d words stored", rep, N));
      fork
        host.read_data(N, 20 * MS, ok);
        if (rep == 0) begin
          repeat (1000) step();
          host.command(FN_START);       // repeat as soon as this down-load ends
        end
      join
      t_end = cyc;
      check_words(pos, N, $sformatf("capture %0d", rep));
      chk(ok && (t_end - t_start) < 20 * MS,
          $sformatf("capture %0d took %0.2f ms (limit 20 ms)", rep, real'(t_end - t_start) / real'(MS)));
      $display("capture %0d: %0.3f ms from start to last word", rep, real'(t_end - t_start) / real'(MS));
      t_start = t_end;
      while (bus.tr_q.size() != 0) step();
    end
    wait_flag(CSR_READY, 1'b0, 20);
    chk(!csr[CSR_READY] && !csr[CSR_ARMED], "idle after the second capture");
  endtask

  task automatic example_program();
    das_word_t tw = 16'hAAAA;
    int pos;
    bit ok;
    host.command(FN_RESET);
    host.load(SEL_T1, tw, 16'd50);
    host.command(FN_START);
    traffic(60, tw, 80);
    pos = trigger_pos(tw);
    wait_flag(CSR_READY, 1'b1, MS);
    chk(csr[CSR_READY], "example: ready flag");
    host.read_data(50, MS, ok);
    chk(ok, "example: down-load");
    check_words(pos, 50, "example");
    host.command(FN_RESET);
    chk(!csr[CSR_READY], "example: reset at the end");
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (4) step();
    fault_effect_experiment();
    example_program();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
