// tb_pwdm: pulse-width demodulator against a PWM bit stream.
// Sends random words as 8-sample cells (1 = 6 samples high, 0 = 2 high) with
// idle gaps, and checks at every rising edge of the recovered clock that the
// data equals the next bit sent, that the clock rises exactly THRESH+2 system
// clocks after the pulse's rising edge is sampled (same for 0 and 1 bits), that no clock pulse appears on an
// idle line, and that one clock pulse comes out per bit.
module tb_pwdm;
  localparam int SPB = 8;
  logic clk = 0, rst_n = 0, pwm = 0;
  logic data, bclk, bclk_d = 0;
  int checks = 0, failures = 0;
  int sent[$];
  int nbits = 0, nclk = 0;
  int rise_cyc = -100, cyc = 0;

  pwdm dut (.clk, .rst_n, .pwm, .data, .bclk);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bit(input bit b);
    int hi = b ? 6 : 2;
    sent.push_back(int'(b)); nbits++;
    for (int i = 0; i < SPB; i++) begin
      pwm <= (i < hi);
      @(posedge clk);
    end
  endtask

  // Monitor: the DUT sees pwm directly (already synchronous here).
  logic pwm_q = 0;
  always @(posedge clk) begin
    cyc++;
    pwm_q  <= pwm;
    bclk_d <= bclk;
    if (pwm && !pwm_q) rise_cyc = cyc;
    if (rst_n && bclk && !bclk_d) begin
      nclk++;
      checks += 2;
      if (sent.size() == 0) begin
        failures++; $display("FAIL clock with no bit sent");
      end else begin
        if (int'(data) != sent[0]) begin failures++; $display("FAIL bit %0d got %0d exp %0d", nclk, data, sent[0]); end
        void'(sent.pop_front());
      end
      if (cyc - rise_cyc != 4 + 2) begin
        failures++; $display("FAIL clock latency %0d", cyc - rise_cyc);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int w = 0; w < 50; w++) begin
      logic [15:0] word = 16'($urandom);
      for (int i = 15; i >= 0; i--) send_bit(word[i]);
      pwm <= 0;
      repeat (10 + ($urandom % 40)) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (nclk != nbits || sent.size() != 0) begin
      failures++; $display("FAIL %0d bits sent, %0d clocks", nbits, nclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
