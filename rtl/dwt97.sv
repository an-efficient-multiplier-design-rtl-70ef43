// dwt97: one-level 1-D (9,7) forward discrete wavelet transform of a pixel
// stream.
//
// Pixels (unsigned PIX_W bits) enter one per cycle when in_valid is high and
// go through the folded five-multiplier filter with the (9,7) analysis
// coefficients. The filter alternates between the lowpass h (even centres)
// and the highpass g (odd centres), so each input sample gives one output,
// and the outputs are demultiplexed onto Y_L and Y_H: the stream
// L0 H0 L1 H1 ... is the decimated two-band transform. Input sample m
// produces the coefficient centred on sample m-4; the samples before the
// first one count as zero.
//
// Output format: signed BAND_W bits with BAND_FRAC fraction bits, rounded
// to nearest (ties up) from the full-precision sum. For 8-bit pixels the
// lowpass stays below 476 and the highpass below 468 in magnitude, well
// inside that range. Latency: yl_valid/yh_valid follow in_valid by 5 cycles.
// The filter structure is the (9,7) filter of the design; the number formats,
// the zero start and the streaming interface are this design's choices.
module dwt97
  import dwt_pkg::*;
#(
  parameter int unsigned IN_W = PIX_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     in_valid,
  input  logic [IN_W-1:0]          in_pix,
  output logic                     yl_valid,
  output logic signed [BAND_W-1:0] yl,
  output logic                     yh_valid,
  output logic signed [BAND_W-1:0] yh
);
  localparam int unsigned W     = MULT_W;
  localparam int unsigned ACC_W = 2 * W + 3;
  localparam int unsigned SHIFT = COEF_FRAC - BAND_FRAC;

  logic                    f_valid, f_odd;
  logic signed [ACC_W-1:0] f_data, f_round;
  logic signed [BAND_W-1:0] y;

  fold97_filter #(.W(W), .C_EVEN(DWT_C_EVEN), .C_ODD(DWT_C_ODD), .ACC_W(ACC_W)) u_filt (
    .clk, .rst_n, .clr, .in_valid,
    .in_data (W'(in_pix)),          // zero extension: pixels are unsigned
    .out_valid(f_valid), .out_odd(f_odd), .out_data(f_data)
  );

  assign f_round = (f_data + (ACC_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
  assign y       = BAND_W'(f_round);

  assign yl_valid = f_valid & ~f_odd;
  assign yh_valid = f_valid &  f_odd;
  assign yl       = y;
  assign yh       = y;

  // The rounded coefficient must fit the band format.
  a_band_range: assert property (@(posedge clk) disable iff (!rst_n)
    f_valid |-> (f_round == ACC_W'(y)))
    else $error("dwt97: coefficient exceeds %0d bits", BAND_W);

  if (IN_W + 2 > W) begin : g_width_check
    $error("dwt97: two pixels must add up inside the multiplier width");
  end
endmodule
