// cla_adder: W-bit carry look-ahead adder.
//
// Every bit position forms the half-adder outputs p = a ^ b (propagate) and
// g = a & b (generate). Inside each group of GROUP bits every carry is
// written out as a two-level AND-OR of the p, g of the bits below it and the
// group's carry in, so no carry ripples through a bit. The groups are joined
// by their group generate and propagate, Gg = g of the top bit OR'ed with
// the lower g's masked by the p's above them, Pg = AND of all p's.
// sum = a + b + cin, cout is the carry out of the top bit. Combinational.
// The group size is a choice of this design.
module cla_adder #(
  parameter int unsigned W     = 32,
  parameter int unsigned GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (W + GROUP - 1) / GROUP;

  logic [W-1:0] p, g;
  logic [W-1:0] c;       // c[i] = carry into bit i
  logic [NG:0]  gc;      // carry into group k
  logic [NG-1:0] grp_g, grp_p;

  assign p = a ^ b;
  assign g = a & b;

  always_comb begin
    // Group generate / propagate.
    for (int k = 0; k < NG; k++) begin
      grp_g[k] = 1'b0;
      grp_p[k] = 1'b1;
      for (int i = 0; i < GROUP; i++) begin
        if (k * GROUP + i < W) begin
          grp_g[k] = g[k*GROUP+i] | (p[k*GROUP+i] & grp_g[k]);
          grp_p[k] = grp_p[k] & p[k*GROUP+i];
        end
      end
    end
  end

  // Group carries: a short chain of AND-OR cells, one per group.
  assign gc[0] = cin;
  for (genvar k = 0; k < NG; k++) begin : g_gc
    assign gc[k+1] = grp_g[k] | (grp_p[k] & gc[k]);
  end

  always_comb begin
    c = '0;
    // Carries inside each group, each as a sum of products.
    for (int k = 0; k < NG; k++) begin
      for (int i = 0; i < GROUP; i++) begin
        if (k * GROUP + i < W) begin
          logic term;
          logic cj;
          // c[k*GROUP+i] = OR over m < i of (g[m] AND p[m+1..i-1]) OR (gc AND p[0..i-1])
          cj = 1'b0;
          for (int m = 0; m < i; m++) begin
            term = g[k*GROUP+m];
            for (int q = m + 1; q < i; q++) term = term & p[k*GROUP+q];
            cj = cj | term;
          end
          term = gc[k];
          for (int q = 0; q < i; q++) term = term & p[k*GROUP+q];
          c[k*GROUP+i] = cj | term;
        end
      end
    end
  end

  assign sum  = p ^ c;
  assign cout = gc[NG];
endmodule
