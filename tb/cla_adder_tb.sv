// cla_adder_tb: checks the 32-bit carry look-ahead adder (4-bit groups) and
// a 10-bit one with 3-bit groups against plain addition, with random
// operands and with carries that run across every group.
module cla_adder_tb;
  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [9:0]  a10, b10, s10;
  logic        cout10;
  int checks = 0, failures = 0;

  cla_adder #(.W(32), .GROUP(4)) dut (.a, .b, .cin, .sum(s), .cout);
  cla_adder #(.W(10), .GROUP(3)) dut10 (.a(a10), .b(b10), .cin, .sum(s10), .cout(cout10));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] av, input logic [31:0] bv, input logic ci);
    logic [32:0] e;
    logic [10:0] e10;
    a = av; b = bv; cin = ci;
    a10 = av[9:0]; b10 = bv[9:0];
    #1;
    e   = {1'b0, av} + {1'b0, bv} + 33'(ci);
    e10 = {1'b0, av[9:0]} + {1'b0, bv[9:0]} + 11'(ci);
    checks += 2;
    if ({cout, s} != e) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h, got %h", av, bv, ci, e, {cout, s});
    end
    if ({cout10, s10} != e10) begin
      failures++;
      $display("FAIL10 %h + %h + %0d = %h, got %h", av[9:0], bv[9:0], ci, e10, {cout10, s10});
    end
  endtask

  initial begin
    apply(32'hFFFF_FFFF, 32'h0, 1'b1);
    apply(32'hFFFF_FFFF, 32'h1, 1'b0);
    apply(32'h7FFF_FFFF, 32'h1, 1'b0);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'h0F0F_0F0F, 32'hF0F0_F0F1, 1'b0);
    for (int t = 0; t < 20000; t++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
