// booth_ppg: one row of the Booth partial product generator.
//
// Each bit cell j takes multiplicand bits x[j] and x[j-1] (x[-1] = 0) and
// picks x[j] for a 1X digit or x[j-1] for a 2X digit, then inverts the
// result when NEG is set. The row is W+1 bits wide so that 2X of a W-bit
// signed multiplicand fits; the top cell uses the sign bit as x[W]. A
// negative row is only one's complemented here: the +1 that completes the
// two's complement is the NEG bit itself, added by the multiplier at the
// row's least significant position. Sign extension of the row is also left
// to the multiplier. Combinational. The two-bit cell (x[j], x[j-1]) follows
// the partial product generator of the design; the 17th cell and the
// one's-complement-plus-NEG scheme are this design's choices.
module booth_ppg
  import dwt_pkg::*;
#(
  parameter int unsigned W = MULT_W
) (
  input  logic [W-1:0] x,    // multiplicand (two's complement)
  input  booth_sel_t   sel,
  output logic [W:0]   pp    // one's-complement partial product row
);
  logic [W+1:0] xe;  // {sign, x, 0}: xe[j+1] = x[j], xe[0] = x[-1] = 0
  assign xe = {x[W-1], x, 1'b0};

  always_comb begin
    for (int j = 0; j <= W; j++) begin
      pp[j] = ((sel.one & xe[j+1]) | (sel.two & xe[j])) ^ sel.neg;
    end
  end
endmodule
