// csa: carry save adder, a row of W full adders with no carry chain.
//
// Bit i adds a[i], b[i] and the third operand d[i] (which enters where a
// ripple adder would take the carry from bit i-1) into s[i] and c[i].
// a + b + d = s + 2*c. The caller shifts c left by one before further use.
// Combinational; the delay is one full adder whatever W is.
module csa #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,  // sum vector
  output logic [W-1:0] c   // carry vector, weight 2^(i+1) for bit i
);
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .c_in(d[i]), .s(s[i]), .c_out(c[i]));
  end
endmodule
