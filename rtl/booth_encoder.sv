// booth_encoder: radix-4 (modified) Booth recoding of one multiplier digit.
//
// Input is the overlapping bit triple {y[i+1], y[i], y[i-1]} of the
// multiplier; output is the select for the partial product generator: NEG,
// 2X and 1X. Purely combinational. The mapping is the Booth truth table of
// the multiplier design, including its choice for 111 (NEG set with a zero
// multiple, which the generator turns into all ones plus a +1 correction, that
// is zero).
module booth_encoder
  import dwt_pkg::*;
(
  input  logic [2:0]  trip,  // {y[i+1], y[i], y[i-1]}
  output booth_sel_t  sel
);
  always_comb begin
    sel.neg = trip[2];
    sel.one = trip[1] ^ trip[0];
    sel.two = (trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]);
  end
endmodule
