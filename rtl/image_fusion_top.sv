// image_fusion_top: wavelet-domain fusion of two RGB images.
//
// Each colour plane of both images is transformed by its own 1-D (9,7)
// forward DWT (six in all). For every plane one fusion unit combines the
// two lowpass (Y_L) bands and another the two highpass (Y_H) bands (six
// fusion units), and the fused bands, re-interleaved, go back through a (9,7)
// inverse DWT (three) to give the fused image. Images
// arrive as one raster stream of pixel pairs (image 1 and image 2, R, G, B),
// one pair per cycle when in_valid and in_ready are both high; in_last marks
// the last pixel of a frame. The rows are transformed as one continuous 1-D
// signal, which the inverse transform rebuilds exactly up to rounding.
//
// Frame sequencing, this design's own addition: the transform pair delays a
// pixel by 8 samples (4 in each direction), so after in_last the sequencer
// drops in_ready and feeds PAD = 8 zero samples to push the last pixels out,
// then waits for the last fused pixel, and clears all filters before it
// accepts the next frame. The first LEAD = 8 outputs of a frame belong to
// positions before the first pixel and are not shown. Output pixel i appears
// on out_pix 11 cycles after input pixel i + 8 was taken (5 in the DWT, 1 in
// fusion, 5 in the IDWT); out_last marks the last pixel of the frame. The
// output has no back-pressure: the receiver takes a pixel whenever out_valid
// is high. out_sat flags a channel whose value was clamped to the pixel
// range.
module image_fusion_top
  import dwt_pkg::*;
#(
  parameter int unsigned CH       = 3,   // colour planes (R, G, B)
  parameter int unsigned FRAME_CW = 32   // width of the frame pixel counters
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic                     in_last,
  input  logic [CH-1:0][PIX_W-1:0] img1_pix,
  input  logic [CH-1:0][PIX_W-1:0] img2_pix,
  output logic                     out_valid,
  output logic                     out_last,
  output logic [CH-1:0][PIX_W-1:0] out_pix,
  output logic [CH-1:0]            out_sat
);
  localparam int unsigned PAD  = 8;
  localparam int unsigned LEAD = 8;

  typedef enum logic [1:0] {S_RUN, S_PAD, S_DRAIN} state_t;
  state_t state;

  logic [FRAME_CW-1:0] n_in;       // pixels taken in this frame
  logic [FRAME_CW-1:0] frame_len;  // valid once in_last has been taken
  logic [FRAME_CW-1:0] n_out;      // IDWT outputs seen in this frame
  logic [3:0]          pad_cnt;
  logic                clr;
  logic                feed;       // a sample enters the DWTs this cycle
  logic                take;       // a pixel pair is accepted

  assign in_ready = (state == S_RUN) && !clr;
  assign take     = in_valid & in_ready;
  assign feed     = take | (state == S_PAD);

  // ---- datapath: 2 x CH forward transforms, 2 x CH fusion units, CH inverse
  logic [CH-1:0]                  idwt_valid;
  logic [CH-1:0][PIX_W-1:0]       idwt_pix;
  logic [CH-1:0]                  idwt_sat;

  for (genvar c = 0; c < CH; c++) begin : g_ch
    logic [PIX_W-1:0]         p1, p2;
    logic                     l1_v, h1_v, l2_v, h2_v;
    logic signed [BAND_W-1:0] l1, h1, l2, h2;
    logic                     fl_v, fh_v;
    logic signed [BAND_W-1:0] fl_c, fh_c;

    // Flush samples are zero pixels.
    assign p1 = (state == S_PAD) ? '0 : img1_pix[c];
    assign p2 = (state == S_PAD) ? '0 : img2_pix[c];

    dwt97 u_dwt1 (.clk, .rst_n, .clr, .in_valid(feed), .in_pix(p1),
                  .yl_valid(l1_v), .yl(l1), .yh_valid(h1_v), .yh(h1));
    dwt97 u_dwt2 (.clk, .rst_n, .clr, .in_valid(feed), .in_pix(p2),
                  .yl_valid(l2_v), .yl(l2), .yh_valid(h2_v), .yh(h2));

    // One fusion unit per band: lowpass pairs and highpass pairs.
    fusion u_fuse_l (.clk, .rst_n, .clr, .in_valid(l1_v & l2_v), .coef_a(l1), .coef_b(l2),
                     .out_valid(fl_v), .out_coef(fl_c));
    fusion u_fuse_h (.clk, .rst_n, .clr, .in_valid(h1_v & h2_v), .coef_a(h1), .coef_b(h2),
                     .out_valid(fh_v), .out_coef(fh_c));

    // The two bands leave on alternate cycles; re-interleave them for the IDWT.
    logic                     fu_v;
    logic signed [BAND_W-1:0] fu_c;
    assign fu_v = fl_v | fh_v;
    assign fu_c = fh_v ? fh_c : fl_c;

    idwt97 u_idwt (.clk, .rst_n, .clr, .in_valid(fu_v), .in_coef(fu_c),
                   .out_valid(idwt_valid[c]), .out_pix(idwt_pix[c]), .out_sat(idwt_sat[c]));
  end

  // ---- frame sequencer
  logic [FRAME_CW-1:0] pos;        // output position n_out - LEAD
  logic                at_last;
  assign pos     = n_out - FRAME_CW'(LEAD);
  assign at_last = (state != S_RUN) && (pos == frame_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RUN;
      n_in      <= '0;
      frame_len <= '0;
      n_out     <= '0;
      pad_cnt   <= '0;
      clr       <= 1'b0;
    end else begin
      clr <= 1'b0;
      if (idwt_valid[0]) n_out <= n_out + 1'b1;
      case (state)
        S_RUN: begin
          if (take) begin
            n_in <= n_in + 1'b1;
            if (in_last) begin
              frame_len <= n_in + 1'b1;
              pad_cnt   <= '0;
              state     <= S_PAD;
            end
          end
        end
        S_PAD: begin
          pad_cnt <= pad_cnt + 1'b1;
          if (pad_cnt == 4'(PAD - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (idwt_valid[0] && n_out >= FRAME_CW'(LEAD) && at_last) begin
            // Last pixel leaves now: restart every filter for the next frame.
            clr   <= 1'b1;
            n_in  <= '0;
            n_out <= '0;
            state <= S_RUN;
          end
        end
        default: state <= S_RUN;
      endcase
    end
  end

  assign out_valid = idwt_valid[0] && (n_out >= FRAME_CW'(LEAD)) && !clr;
  assign out_last  = out_valid && at_last;
  assign out_pix   = idwt_pix;
  assign out_sat   = idwt_sat & {CH{out_valid}};

  // All channels run in lock step, and the two bands never collide.
  property p_lockstep;
    @(posedge clk) disable iff (!rst_n) idwt_valid == {CH{idwt_valid[0]}};
  endproperty
  a_lockstep: assert property (p_lockstep);
  a_bands: assert property (@(posedge clk) disable iff (!rst_n)
                            !(g_ch[0].fl_v && g_ch[0].fh_v));
endmodule
