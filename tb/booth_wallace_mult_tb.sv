// booth_wallace_mult_tb: compares the 16 x 16 Booth/Wallace multiplier with
// the simulator's own signed multiply for corner values (most negative,
// most positive, -1, 0, alternating bits) in every pairing and for random
// operands, plus an 8 x 8 instance checked exhaustively.
module booth_wallace_mult_tb;
  logic signed [15:0] x, y;
  logic signed [31:0] p;
  logic signed [7:0]  x8, y8;
  logic signed [15:0] p8;
  int checks = 0, failures = 0;

  booth_wallace_mult #(.W(16)) dut (.x, .y, .p);
  booth_wallace_mult #(.W(8))  dut8 (.x(x8), .y(y8), .p(p8));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic signed [15:0] xv, input logic signed [15:0] yv);
    longint e;
    x = xv; y = yv;
    #1;
    e = longint'(xv) * longint'(yv);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", xv, yv, e, p);
    end
  endtask

  initial begin
    logic signed [15:0] cv [8] = '{16'sh8000, 16'sh7FFF, -16'sd1, 16'sd0, 16'sd1,
                                   16'sh5555, 16'shAAAA, 16'sd13971};
    foreach (cv[i]) foreach (cv[j]) apply(cv[i], cv[j]);
    for (int t = 0; t < 50000; t++) apply(16'($urandom), 16'($urandom));
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        x8 = 8'(i); y8 = 8'(j);
        #1;
        checks++;
        if (int'(p8) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d * %0d got %0d", i, j, p8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
