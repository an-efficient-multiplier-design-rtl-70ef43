// fusion: combines the wavelet coefficients of two images, one coefficient
// pair per cycle.
//
// The coefficients of the same band and position from image 1 and image 2
// are added; the sum is halved (arithmetic shift, rounding toward minus
// infinity) so that the fused image keeps the pixel range of its inputs.
// The same rule serves the lowpass and the highpass band. Registered:
// out_valid and out_coef follow in_valid by one cycle. Adding the two
// transforms is the fusion rule of the design; the halving is this design's
// choice.
module fusion
  import dwt_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     in_valid,
  input  logic signed [BAND_W-1:0] coef_a,
  input  logic signed [BAND_W-1:0] coef_b,
  output logic                     out_valid,
  output logic signed [BAND_W-1:0] out_coef
);
  logic signed [BAND_W:0] sum;
  assign sum = (BAND_W+1)'(coef_a) + (BAND_W+1)'(coef_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_coef  <= '0;
    end else begin
      out_valid <= in_valid & ~clr;
      if (in_valid) out_coef <= sum[BAND_W:1];
    end
  end
endmodule
