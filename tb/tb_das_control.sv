// tb_das_control: the DAS sequencer and host handshake.
// Stands in for the trigger circuit and the buffer (hit, full, rd_empty are
// driven by the testbench with a word counter) and walks through: parameter
// load of three words, start (ARMED within one clock, well inside 200 ns),
// trigger, full, ready flag in csr bit 10, down-load with one-clock read
// latency and back-pressure, ready flag clearing after the last word, start
// during down-load (re-arm afterwards), reset from every active state with
// control registers kept, a read outside READY being ignored, START while
// armed or acquiring restarting the search, a word count of 0, a second
// parameter load, and control words outside a LOAD being ignored.
module tb_das_control;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fn_valid = 0, in_valid = 0, trig_hit = 0, full = 0, rd_empty = 1, out_ready = 0;
  das_fn_e fn = FN_LOAD;
  das_word_t in_data = '0, trig_word, csr;
  sel_code_t sel;
  logic [15:0] count;
  logic armed, acquiring, clr, rd_next, out_valid;
  das_state_e state;
  int checks = 0, failures = 0;

  das_control dut (.clk, .rst_n, .fn_valid, .fn, .in_valid, .in_data, .trig_hit, .full,
                   .rd_empty, .out_ready, .sel, .trig_word, .count, .armed, .acquiring,
                   .clr, .rd_next, .out_valid, .csr, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s csr %h)", what, state.name(), csr); end
  endtask

  task automatic cmd(input das_fn_e f);
    fn_valid <= 1; fn <= f; @(posedge clk); fn_valid <= 0; #1;
  endtask

  task automatic load(input int s, input int w, input int n);
    cmd(FN_LOAD);
    in_valid <= 1; in_data <= 16'(s); @(posedge clk);
    in_valid <= 0; @(posedge clk);
    in_valid <= 1; in_data <= 16'(w); @(posedge clk);
    in_valid <= 1; in_data <= 16'(n); @(posedge clk);
    in_valid <= 1; in_data <= 16'h1234; @(posedge clk);   // extra word ignored
    in_valid <= 0; #1;
  endtask

  // Down-load n words; the "buffer" is a counter that the test checks.
  task automatic download(input int n, output int got);
    int rd = 0;
    got = 0;
    rd_empty = (n == 0);
    while (state == ST_DNLOAD || state == ST_READY) begin
      out_ready <= ($urandom % 2 == 0);
      @(posedge clk); #1;
      if (rd_next) begin rd++; got++; end
      rd_empty = (rd >= n);
      if (got > n + 1) break;
    end
    out_ready <= 0;
  endtask

  initial begin
    int got;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    chk(state == ST_IDLE && !csr[10], "idle after reset");
    load(4'd10, 16'hBEEF, 25);
    chk(sel == 4'd10 && trig_word == 16'hBEEF && count == 16'd25, "three control words loaded in order");
    cmd(FN_READ);
    chk(state == ST_IDLE, "read ignored when not ready");
    cmd(FN_START);
    chk(armed && csr[8] && !csr[10], "armed one clock after start");
    chk(clr, "clear pulse at start");
    repeat (5) @(posedge clk); #1;
    chk(armed, "stays armed without trigger");
    trig_hit <= 1; @(posedge clk); trig_hit <= 0; #1;
    chk(acquiring && csr[9], "acquiring after trigger");
    full <= 1; @(posedge clk); #1;
    chk(state == ST_READY && csr[10], "ready flag (csr bit 10) when full");
    full <= 0;
    repeat (3) @(posedge clk); #1;
    chk(csr[10], "ready flag holds until read");
    cmd(FN_READ);
    chk(state == ST_DNLOAD && csr[10] && csr[11], "down-load started, flag still set");
    download(25, got);
    chk(got == 25, $sformatf("25 words taken (got %0d)", got));
    chk(state == ST_IDLE && !csr[10], "flag clears after last word");
    // Repetitive: start during down-load re-arms afterwards.
    cmd(FN_START); trig_hit <= 1; @(posedge clk); trig_hit <= 0;
    full <= 1; @(posedge clk); full <= 0; #1;
    chk(state == ST_READY, "second acquisition ready");
    cmd(FN_READ);
    cmd(FN_START);
    chk(csr[12] && state == ST_DNLOAD, "start during down-load is pending");
    download(25, got);
    chk(got == 25 && state == ST_ARMED && !csr[12], "re-armed after down-load");
    // Reset from ARMED, ACQ, READY, DNLOAD keeps control registers.
    cmd(FN_RESET);
    chk(state == ST_IDLE && clr, "reset from armed");
    cmd(FN_START); trig_hit <= 1; @(posedge clk); trig_hit <= 0; #1;
    cmd(FN_RESET);
    chk(state == ST_IDLE, "reset from acquiring");
    cmd(FN_START); trig_hit <= 1; @(posedge clk); trig_hit <= 0; full <= 1; @(posedge clk); full <= 0;
    cmd(FN_RESET);
    chk(state == ST_IDLE && !csr[10], "reset from ready clears flag");
    cmd(FN_START); trig_hit <= 1; @(posedge clk); trig_hit <= 0; full <= 1; @(posedge clk); full <= 0;
    cmd(FN_READ); rd_empty = 0; repeat (3) @(posedge clk);
    cmd(FN_RESET);
    chk(state == ST_IDLE && !out_valid, "reset during down-load");
    chk(sel == 4'd10 && trig_word == 16'hBEEF && count == 16'd25, "reset keeps control registers");
    chk(csr[3:0] == 4'd10 && csr[15:13] == 3'b0 && csr[7:4] == 4'b0, "csr shows the trigger code, unused bits 0");
    // START while armed restarts the search (clear pulse, still armed).
    cmd(FN_START);
    repeat (3) @(posedge clk); #1;
    cmd(FN_START);
    chk(armed && clr, "start while armed restarts the search");
    // START while acquiring restarts too.
    trig_hit <= 1; @(posedge clk); trig_hit <= 0; #1;
    chk(acquiring, "acquiring again");
    cmd(FN_START);
    chk(armed && clr, "start while acquiring restarts the search");
    // Count of 0: full at once gives ready straight after the trigger.
    cmd(FN_RESET);
    load(4'd3, 16'h0001, 0);
    chk(sel == 4'd3 && count == 16'd0, "second load replaces the parameters");
    cmd(FN_START); trig_hit <= 1; @(posedge clk); trig_hit <= 0; full <= 1; @(posedge clk); full <= 0; #1;
    chk(state == ST_READY && csr[10], "count 0: ready right after the trigger");
    cmd(FN_READ);
    download(0, got);
    chk(got == 0 && state == ST_IDLE && !csr[10], "count 0: empty down-load ends at once");
    // Control words without a LOAD are ignored.
    in_valid <= 1; in_data <= 16'h00FF; @(posedge clk); in_valid <= 0; #1;
    chk(sel == 4'd3 && count == 16'd0, "control words outside a LOAD ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
