// idwt97: one-level 1-D (9,7) inverse discrete wavelet transform, from an
// interleaved L/H coefficient stream back to pixels.
//
// The coefficient stream L0 H0 L1 H1 ... enters one value per cycle. The
// synthesis filters of the (9,7) pair are a 7-tap lowpass and a 9-tap
// highpass; interleaving the two bands turns their sum into one symmetric
// 9-tap filter whose taps alternate between the two filters, with the
// alternation swapped between even and odd output samples. That is the same
// folded five-multiplier structure as the forward transform, here with the
// synthesis coefficient sets. Input number m gives the pixel centred on
// coefficient m-4, so a stream that began with the first forward output gives
// pixel m-8.
//
// Output: the full-precision sum (BAND_FRAC + COEF_FRAC fraction bits) is
// rounded to nearest and clamped to 0 .. 2^PIX_W-1; out_sat flags a clamped
// sample. Input coefficients must keep the sum of any two inside 16 bits
// signed. Latency: out_valid follows in_valid by 5 cycles.
// The structure of the inverse transform is this design's own: it reuses the
// forward filter datapath.
module idwt97
  import dwt_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     in_valid,
  input  logic signed [BAND_W-1:0] in_coef,
  output logic                     out_valid,
  output logic [PIX_W-1:0]         out_pix,
  output logic                     out_sat
);
  localparam int unsigned W     = MULT_W;
  localparam int unsigned ACC_W = 2 * W + 3;
  localparam int unsigned SHIFT = COEF_FRAC + BAND_FRAC;
  localparam int          PMAX  = (1 << PIX_W) - 1;

  logic                    f_valid, f_odd;
  logic signed [ACC_W-1:0] f_data, f_round;

  fold97_filter #(.W(W), .C_EVEN(IDWT_C_EVEN), .C_ODD(IDWT_C_ODD), .ACC_W(ACC_W)) u_filt (
    .clk, .rst_n, .clr, .in_valid,
    .in_data (W'(in_coef)),
    .out_valid(f_valid), .out_odd(f_odd), .out_data(f_data)
  );

  assign f_round = (f_data + (ACC_W'(1) <<< (SHIFT - 1))) >>> SHIFT;

  always_comb begin
    out_sat = 1'b0;
    if (f_round < 0) begin
      out_pix = '0;
      out_sat = 1'b1;
    end else if (f_round > ACC_W'(PMAX)) begin
      out_pix = '1;
      out_sat = 1'b1;
    end else begin
      out_pix = PIX_W'(f_round);
    end
  end

  assign out_valid = f_valid;

  // The parity of the output is tracked by the filter; the stream needs no
  // separate phase input.
  logic unused_odd;
  assign unused_odd = f_odd;
endmodule
