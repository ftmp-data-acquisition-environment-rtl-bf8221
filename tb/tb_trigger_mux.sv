// tb_trigger_mux: every selection code with random line and clock patterns.
// The expected pair comes from a table written out per code: T_n with T_nC,
// R_n with R_nC, P_n with C, and nothing for code 15.
module tb_trigger_mux;
  import das_pkg::*;
  sel_code_t   sel;
  logic [14:0] lines;
  logic [10:0] clks;
  logic        data, sclk;
  int checks = 0, failures = 0;

  trigger_mux dut (.sel, .lines, .clks, .data, .sclk);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int k = 0; k < 64; k++) begin
        logic ed, ec;
        sel = 4'(s); lines = 15'($urandom); clks = 11'($urandom);
        // Walk a one through to hit both levels deterministically.
        if (k < 2) begin lines = k[0] ? '1 : '0; clks = k[0] ? '1 : '0; end
        if (s <= 4)       begin ed = lines[s]; ec = clks[s];       end   // T
        else if (s <= 9)  begin ed = lines[s]; ec = clks[s];       end   // R
        else if (s <= 14) begin ed = lines[s]; ec = clks[10];      end   // P, voted C
        else              begin ed = 1'b0;     ec = 1'b0;          end
        #1;
        checks++;
        if (data !== ed || sclk !== ec) begin
          failures++;
          $display("FAIL sel %0d lines %h clks %h -> %b%b exp %b%b", s, lines, clks, data, sclk, ed, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
