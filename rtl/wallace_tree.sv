// wallace_tree: reduces N operands of W bits to a sum and a carry vector.
//
// Each level groups its operands in threes, feeds every group to a carry
// save adder and passes the one or two operands left over straight down, so
// a level of n operands leaves 2*floor(n/3) + n mod 3. For the 9 operands of
// the 16-bit Booth multiplier (8 partial products and the row of NEG
// corrections) that is 9 -> 6 -> 4 -> 3 -> 2, four full-adder delays.
// Carry vectors are shifted left one place as they leave a level; bits
// shifted out of the top are dropped, so the result is exact modulo 2^W.
// Combinational. sum_vec + carry_vec = sum of the operands (mod 2^W).
// Building the tree from carry save adders is the multiplier design's; the
// grouping by threes at each level is this design's choice.
module wallace_tree #(
  parameter int unsigned N = 9,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        sum_vec,
  output logic [W-1:0]        carry_vec
);
  // Operand count after `lvl` levels of reduction.
  function automatic int unsigned count_at(int unsigned lvl);
    int unsigned n = N;
    for (int unsigned i = 0; i < lvl; i++) begin
      if (n > 2) n = 2 * (n / 3) + n % 3;
    end
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = N;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // Each level lives in its own generate scope, so the tools see separate
  // nets per level rather than one array feeding itself.
  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_level
    localparam int unsigned NI = count_at(lv);
    localparam int unsigned NO = count_at(lv + 1);
    localparam int unsigned G  = NI / 3;
    logic [W-1:0] vin  [NI];
    logic [W-1:0] vout [NO];
    if (lv == 0) begin : g_from_ops
      for (genvar k = 0; k < NI; k++) begin : g_k
        assign vin[k] = ops[k];
      end
    end else begin : g_from_prev
      for (genvar k = 0; k < NI; k++) begin : g_k
        assign vin[k] = g_level[lv-1].vout[k];
      end
    end
    for (genvar gi = 0; gi < G; gi++) begin : g_csa
      logic [W-1:0] c_raw;
      csa #(.W(W)) u_csa (
        .a(vin[3*gi]), .b(vin[3*gi+1]), .d(vin[3*gi+2]),
        .s(vout[2*gi]), .c(c_raw)
      );
      // Carry out of the top column has weight 2^W and is dropped.
      assign vout[2*gi+1] = {c_raw[W-2:0], 1'b0};
    end
    for (genvar r = 0; r < NI % 3; r++) begin : g_pass
      assign vout[2*G+r] = vin[3*G+r];
    end
  end

  if (LEVELS == 0) begin : g_none
    assign sum_vec   = ops[0];
    assign carry_vec = (N >= 2) ? ops[N-1] : '0;
  end else begin : g_out
    assign sum_vec   = g_level[LEVELS-1].vout[0];
    assign carry_vec = g_level[LEVELS-1].vout[1];
  end
endmodule
