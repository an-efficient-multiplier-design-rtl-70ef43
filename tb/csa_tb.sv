// csa_tb: exhaustive test of the 4-bit carry save adder: for every a, b, d
// the sum vector plus twice the carry vector must equal a + b + d, and each
// bit pair must be the full-adder result of its column.
module csa_tb;
  localparam int W = 4;
  logic [W-1:0] a, b, d, s, c;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.a, .b, .d, .s, .c);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (3 * W)); i++) begin
      {a, b, d} = (3 * W)'(i);
      #1;
      checks++;
      if (int'(s) + 2 * int'(c) != int'(a) + int'(b) + int'(d)) begin
        failures++;
        $display("FAIL a=%0d b=%0d d=%0d s=%0d c=%0d", a, b, d, s, c);
      end
      for (int k = 0; k < W; k++) begin
        checks++;
        if ({c[k], s[k]} != 2'(a[k] + b[k] + d[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
