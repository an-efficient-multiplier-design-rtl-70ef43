// full_adder: one-bit full adder, the cell of the carry save adder.
// s = a ^ b ^ c_in, c_out = majority(a, b, c_in). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c_in,
  output logic s,
  output logic c_out
);
  assign s     = a ^ b ^ c_in;
  assign c_out = (a & b) | (a & c_in) | (b & c_in);
endmodule
