// booth_ppg_tb: drives one partial product row with random and corner
// multiplicands under every NEG/2X/1X select and checks that the row, read
// as a signed number plus its NEG correction, equals the selected multiple
// of the multiplicand.
module booth_ppg_tb;
  import dwt_pkg::*;
  localparam int W = 16;
  logic [W-1:0] x;
  booth_sel_t   sel;
  logic [W:0]   pp;
  int checks = 0, failures = 0;

  booth_ppg #(.W(W)) dut (.x, .sel, .pp);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] xv, input logic [2:0] s);
    longint mult, expv, got;
    x = xv;
    sel = booth_sel_t'(s);
    #1;
    // multiple selected by (two, one); the table never sets both
    mult = s[1] ? 2 : (s[0] ? 1 : 0);
    if (s[2]) mult = -mult;
    expv = mult * longint'($signed(xv));
    got  = longint'($signed(pp)) + (s[2] ? 1 : 0);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL x=%0d sel=%03b got %0d exp %0d", $signed(xv), s, got, expv);
    end
  endtask

  initial begin
    logic [W-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h5555};
    foreach (corners[i])
      for (int s = 0; s < 8; s++) if (!(s[1] && s[0])) check(corners[i], 3'(s));
    for (int k = 0; k < 2000; k++) begin
      logic [2:0] s;
      s = 3'($urandom_range(0, 7));
      if (s[1] && s[0]) s[0] = 1'b0;
      check(16'($urandom), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
