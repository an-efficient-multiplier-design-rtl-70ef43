// booth_wallace_mult: W x W signed multiplier built from Booth encoders,
// partial product generators, a Wallace tree of carry save adders and a
// final carry look-ahead adder.
//
// The multiplier y is cut into W/2 overlapping triples {y[2i+1], y[2i],
// y[2i-1]} (y[-1] = 0); each goes through a Booth encoder whose NEG/2X/1X
// select drives one partial product row built from the multiplicand x.
// Each row is sign-extended to 2W bits and shifted left 2i places. Because
// a row is only one's complemented for a negative digit, the NEG bits form
// one more operand, with NEG of digit i at bit 2i. The Wallace tree reduces
// these W/2 + 1 operands to two, and the carry look-ahead adder adds them.
// p = x * y, exact, for all signed W-bit inputs. Combinational.
// The structure (encoder, generator, CSA tree, CLA) is the multiplier
// design's; W must be even.
module booth_wallace_mult
  import dwt_pkg::*;
#(
  parameter int unsigned W = MULT_W
) (
  input  logic signed [W-1:0]   x,   // multiplicand
  input  logic signed [W-1:0]   y,   // multiplier
  output logic signed [2*W-1:0] p
);
  localparam int unsigned ND = W / 2;    // Booth digits / partial products
  localparam int unsigned NOPS = ND + 1; // plus the NEG correction row

  logic [W:0]          ye;    // {y, 0}
  booth_sel_t          sel [ND];
  logic [W:0]          pp  [ND];
  logic [NOPS-1:0][2*W-1:0] ops;
  logic [2*W-1:0]      s_vec, c_vec;
  logic [2*W-1:0]      corr;
  logic                unused_cout;

  assign ye = {y, 1'b0};

  for (genvar i = 0; i < ND; i++) begin : g_digit
    booth_encoder u_enc (.trip(ye[2*i+2 -: 3]), .sel(sel[i]));
    booth_ppg #(.W(W)) u_ppg (.x(x), .sel(sel[i]), .pp(pp[i]));
    // Sign-extend the (W+1)-bit row to 2W bits and place it at weight 4^i.
    logic [2*W-1:0] row_ext;
    assign row_ext   = {{(W-1){pp[i][W]}}, pp[i]};
    assign ops[i]    = row_ext << (2 * i);
    assign corr[2*i]   = sel[i].neg;
    assign corr[2*i+1] = 1'b0;
  end
  assign corr[2*W-1:W] = '0;
  assign ops[ND] = corr;

  wallace_tree #(.N(NOPS), .W(2*W)) u_tree (.ops(ops), .sum_vec(s_vec), .carry_vec(c_vec));

  cla_adder #(.W(2*W), .GROUP(4)) u_cla (
    .a(s_vec), .b(c_vec), .cin(1'b0), .sum(p), .cout(unused_cout)
  );
endmodule
