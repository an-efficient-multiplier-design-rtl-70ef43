// fusion_tb: random and extreme coefficient pairs into the fusion unit; the
// output one cycle later must be floor((a + b) / 2), and an idle cycle or
// clr must give no output.
module fusion_tb;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic signed [15:0] coef_a = '0, coef_b = '0;
  logic out_valid;
  logic signed [15:0] out_coef;
  int checks = 0, failures = 0;

  fusion dut (.clk, .rst_n, .clr, .in_valid, .coef_a, .coef_b, .out_valid, .out_coef);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 5000; t++) begin
      int a, b, e;
      bit v, c;
      v = ($urandom_range(0, 4) != 0);
      c = ($urandom_range(0, 20) == 0);
      case (t)
        0: begin a = 32767;  b = 32767;  end
        1: begin a = -32768; b = -32768; end
        2: begin a = -1;     b = 0;      end
        3: begin a = 32767;  b = -32768; end
        default: begin a = int'($signed(16'($urandom))); b = int'($signed(16'($urandom))); end
      endcase
      if (t < 4) begin v = 1; c = 0; end
      coef_a   <= 16'(a);
      coef_b   <= 16'(b);
      in_valid <= v;
      clr      <= c;
      @(posedge clk);
      #1;
      e = (a + b) >>> 1;
      checks++;
      if (out_valid != (v && !c)) begin
        failures++;
        $display("FAIL valid at %0d", t);
      end else if (out_valid && int'(out_coef) != e) begin
        failures++;
        $display("FAIL (%0d + %0d)/2 got %0d exp %0d", a, b, out_coef, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
