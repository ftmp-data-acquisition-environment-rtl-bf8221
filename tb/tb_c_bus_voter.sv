// tb_c_bus_voter: exhaustive check of the 3-of-5 C bus vote.
// All 32 input patterns are applied; the expected output is worked out by
// counting ones. Also checks that any two failed lines (stuck at either
// level) cannot change the voted clock.
module tb_c_bus_voter;
  logic [4:0] c_in;
  logic       c_out;
  int checks = 0, failures = 0;

  c_bus_voter dut (.c_in, .c_out);

  function automatic logic ref_vote(logic [4:0] v);
    return ($countones(v) >= 3);
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      c_in = 5'(v); #1;
      checks++;
      if (c_out !== ref_vote(5'(v))) begin
        failures++; $display("FAIL vote %b -> %b", c_in, c_out);
      end
    end
    // Two stuck lines: clock level must still pass through.
    for (int a = 0; a < 5; a++) for (int b = a + 1; b < 5; b++)
      for (int lvl = 0; lvl < 4; lvl++) for (int ck = 0; ck < 2; ck++) begin
        c_in = (ck != 0) ? 5'b11111 : 5'b00000;
        c_in[a] = (lvl % 2 != 0); c_in[b] = (lvl >= 2); #1;
        checks++;
        if (c_out !== (ck != 0)) begin
          failures++; $display("FAIL stuck %0d,%0d clock %0d got %b", a, b, ck, c_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
