// wallace_tree_tb: random operand sets for the 9 x 32-bit tree used by the
// multiplier and for a 5 x 12-bit tree; the two output vectors must add up
// to the sum of the operands modulo 2^W.
module wallace_tree_tb;
  logic [8:0][31:0] ops9;
  logic [31:0]      s9, c9;
  logic [4:0][11:0] ops5;
  logic [11:0]      s5, c5;
  int checks = 0, failures = 0;

  wallace_tree #(.N(9), .W(32)) dut9 (.ops(ops9), .sum_vec(s9), .carry_vec(c9));
  wallace_tree #(.N(5), .W(12)) dut5 (.ops(ops5), .sum_vec(s5), .carry_vec(c5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] e9;
      logic [11:0] e5;
      e9 = '0;
      e5 = '0;
      for (int k = 0; k < 9; k++) begin
        ops9[k] = (t < 10) ? ((t % 2) ? '1 : 32'h8000_0001) : $urandom;
        e9 += ops9[k];
      end
      for (int k = 0; k < 5; k++) begin
        ops5[k] = 12'($urandom);
        e5 += ops5[k];
      end
      #1;
      checks += 2;
      if (s9 + c9 != e9) begin
        failures++;
        $display("FAIL N=9 got %h exp %h", s9 + c9, e9);
      end
      if (12'(s5 + c5) != e5) begin
        failures++;
        $display("FAIL N=5 got %h exp %h", 12'(s5 + c5), e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
