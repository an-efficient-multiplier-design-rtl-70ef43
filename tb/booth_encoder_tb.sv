// booth_encoder_tb: applies all eight multiplier bit triples to the Booth
// encoder and compares NEG/2X/1X with the recoding table, entered here as
// literals.
module booth_encoder_tb;
  import dwt_pkg::*;
  logic [2:0] trip;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip, .sel);

  // {neg, two, one} for triples 000 .. 111
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b001, 3'b010,
                                     3'b110, 3'b101, 3'b101, 3'b100};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      trip = 3'(t);
      #1;
      checks++;
      if ({sel.neg, sel.two, sel.one} !== EXP[t]) begin
        failures++;
        $display("FAIL trip=%03b got %03b exp %03b", trip, {sel.neg, sel.two, sel.one}, EXP[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
