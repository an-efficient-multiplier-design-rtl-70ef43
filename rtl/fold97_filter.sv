// fold97_filter: folded symmetric 9-tap filter with five multipliers, the
// datapath of the (9,7) wavelet filter.
//
// A 9-sample window w[0..8] (w[0] newest) shifts by one on each accepted
// sample. Its centre is w[4]; for tap distance j = 1..4 a pre-adder forms
// w[4-j] + w[4+j], so the five multipliers see (w[4]), (w[3]+w[5]), ...,
// (w[0]+w[8]). Each multiplier has a two-way coefficient select: C_EVEN on
// samples where the window centre has even index, C_ODD on odd ones; the
// phase bit toggles with every accepted sample and starts even after reset or
// clr. With the (9,7) analysis sets this yields the lowpass output on even
// centres and the highpass output on odd centres, i.e. one decimated output
// per input sample; with the synthesis sets it is the inverse transform of an
// interleaved L/H stream.
//
// Pipeline (one stage per register of the filter diagram): 1 pre-add
// register, 2 product register, 3 pairwise sums (taps 4+3, 2+1, centre
// delayed), 4 sum of those pairs (centre delayed), 5 final sum. out_valid
// follows in_valid by LATENCY = 5 cycles; a new sample may enter every
// cycle. Products and sums are kept at full precision (ACC_W bits); scaling
// is left to the wrapper. The pre-adder result is cut to W bits: callers keep
// the sum of two samples inside the signed W-bit range.
// The window register is reset to zero, so the transform sees zeros before
// the first sample. clr restarts a stream without a full reset.
module fold97_filter
  import dwt_pkg::*;
#(
  parameter int unsigned W      = MULT_W,
  parameter coef5_t      C_EVEN = DWT_C_EVEN,
  parameter coef5_t      C_ODD  = DWT_C_ODD,
  parameter int unsigned ACC_W  = 2 * W + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,        // synchronous restart of the stream
  input  logic                    in_valid,
  input  logic signed [W-1:0]     in_data,
  output logic                    out_valid,
  output logic                    out_odd,    // centre index of this output is odd
  output logic signed [ACC_W-1:0] out_data
);
  localparam int unsigned LATENCY = 5;

  logic signed [W-1:0] win [9];    // win[0] newest
  logic signed [W-1:0] nxt [9];    // window including the incoming sample
  logic                phase;      // parity of the centre of the incoming window

  always_comb begin
    nxt[0] = in_data;
    for (int k = 1; k < 9; k++) nxt[k] = win[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 9; k++) win[k] <= '0;
      phase <= 1'b0;
    end else if (clr) begin
      for (int k = 0; k < 9; k++) win[k] <= '0;
      phase <= 1'b0;
    end else if (in_valid) begin
      win   <= nxt;
      phase <= ~phase;
    end
  end

  // Stage 1: symmetric pre-adders and coefficient select.
  logic signed [W-1:0] s1_pre [5];
  logic                s1_odd, s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 5; j++) s1_pre[j] <= '0;
      s1_odd   <= 1'b0;
      s1_valid <= 1'b0;
    end else begin
      s1_pre[0] <= nxt[4];
      for (int j = 1; j < 5; j++) s1_pre[j] <= W'(nxt[4-j] + nxt[4+j]);
      s1_odd   <= phase;
      s1_valid <= in_valid & ~clr;
    end
  end

  // Stage 2: five Booth/Wallace multipliers.
  logic signed [2*W-1:0] prod   [5];
  logic signed [2*W-1:0] s2_prod[5];
  logic                  s2_odd, s2_valid;

  for (genvar j = 0; j < 5; j++) begin : g_tap
    logic signed [W-1:0] coef;
    assign coef = s1_odd ? W'(C_ODD[j]) : W'(C_EVEN[j]);
    booth_wallace_mult #(.W(W)) u_mult (.x(s1_pre[j]), .y(coef), .p(prod[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 5; j++) s2_prod[j] <= '0;
      s2_odd   <= 1'b0;
      s2_valid <= 1'b0;
    end else begin
      s2_prod  <= prod;
      s2_odd   <= s1_odd;
      s2_valid <= s1_valid & ~clr;
    end
  end

  // Stages 3 to 5: adder tree.
  logic signed [ACC_W-1:0] s3_a, s3_b, s3_c, s4_ab, s4_c;
  logic                    s3_odd, s3_valid, s4_odd, s4_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_a <= '0; s3_b <= '0; s3_c <= '0;
      s4_ab <= '0; s4_c <= '0;
      out_data <= '0;
      s3_odd <= 1'b0; s3_valid <= 1'b0;
      s4_odd <= 1'b0; s4_valid <= 1'b0;
      out_odd <= 1'b0; out_valid <= 1'b0;
    end else begin
      s3_a     <= ACC_W'(s2_prod[4]) + ACC_W'(s2_prod[3]);
      s3_b     <= ACC_W'(s2_prod[2]) + ACC_W'(s2_prod[1]);
      s3_c     <= ACC_W'(s2_prod[0]);
      s3_odd   <= s2_odd;
      s3_valid <= s2_valid & ~clr;
      s4_ab    <= s3_a + s3_b;
      s4_c     <= s3_c;
      s4_odd   <= s3_odd;
      s4_valid <= s3_valid & ~clr;
      out_data <= s4_ab + s4_c;
      out_odd  <= s4_odd;
      out_valid <= s4_valid & ~clr;
    end
  end

  // The symmetric pre-adders must not overflow the multiplier input.
  for (genvar j = 1; j < 5; j++) begin : g_pre_chk
    logic signed [W:0] wide;
    assign wide = (W+1)'(nxt[4-j]) + (W+1)'(nxt[4+j]);
    a_pre_range: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid |-> (wide == (W+1)'(W'(wide))))
      else $error("fold97_filter: pre-adder %0d overflows", j);
  end

  if (LATENCY != 5) begin : g_bad_latency
    $error("fold97_filter: pipeline depth is fixed at 5");
  end
endmodule
