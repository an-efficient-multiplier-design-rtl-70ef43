// image_fusion_full_tb: one complete 480 x 640 RGB frame through the fusion
// pipeline at its default parameters.
//
// Image 1 is a smooth colour gradient (standing in for the blurred colour
// image), image 2 a sharp pattern of blocks, stripes and noise (standing in
// for the detailed grey-scale image, the same in all three planes). The
// pixels stream in raster order, one per cycle. Every fused pixel of every
// plane is compared with the reference model and with the plain average,
// and the frame must return exactly 307200 pixels ending with out_last.
module image_fusion_full_tb;
  import dwt_pkg::*;
  import wavelet_ref_pkg::*;

  localparam int CH = 3;
  localparam int ROWS = 480, COLS = 640;
  localparam int N = ROWS * COLS;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [CH-1:0][7:0] img1_pix = '0, img2_pix = '0;
  logic out_valid, out_last;
  logic [CH-1:0][7:0] out_pix;
  logic [CH-1:0] out_sat;

  int checks = 0, failures = 0;

  image_fusion_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_last, .img1_pix, .img2_pix,
                        .out_valid, .out_last, .out_pix, .out_sat);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int_q p1 [CH], p2 [CH], exp_pix [CH];
  int   n_out = 0;
  bit   done = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid && !done) begin
      for (int c = 0; c < CH; c++) begin
        int d;
        checks++;
        if (int'(out_pix[c]) != exp_pix[c][n_out]) begin
          failures++;
          if (failures < 20) $display("FAIL ch%0d pixel %0d: got %0d exp %0d", c, n_out, out_pix[c], exp_pix[c][n_out]);
        end
        d = int'(out_pix[c]) - (p1[c][n_out] + p2[c][n_out]) / 2;
        if (d > 2 || d < -2) failures++;
      end
      if (out_last) begin
        done = 1;
        checks++;
        if (n_out != N - 1) begin
          failures++;
          $display("FAIL out_last at %0d", n_out);
        end
      end
      n_out++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      int r = i / COLS, col = i % COLS, v;
      p1[0].push_back((r * 255) / (ROWS - 1));
      p1[1].push_back((col * 255) / (COLS - 1));
      p1[2].push_back(((r + col) * 255) / (ROWS + COLS - 2));
      if (((r / 32) + (col / 32)) % 2 == 0) v = 230;
      else if (col % 8 < 2) v = 0;
      else v = int'($urandom_range(40, 200));
      for (int c = 0; c < CH; c++) p2[c].push_back(v);
    end
    for (int c = 0; c < CH; c++) begin
      int_q a, b, fu, rr;
      a  = dwt(p1[c], N + 8);
      b  = dwt(p2[c], N + 8);
      fu = fuse(a, b);
      rr = idwt(fu);
      for (int i = 0; i < N; i++) exp_pix[c].push_back(rr[i + 8]);
    end
    $display("reference ready");
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      bit acc;
      do begin
        @(negedge clk);
        in_valid = 1;
        in_last  = (i == N - 1);
        for (int c = 0; c < CH; c++) begin
          img1_pix[c] = 8'(p1[c][i]);
          img2_pix[c] = 8'(p2[c][i]);
        end
        acc = in_ready;
        @(posedge clk);
      end while (!acc);
    end
    @(negedge clk);
    in_valid = 0;
    in_last = 0;
    while (!done) @(posedge clk);
    checks++;
    if (n_out != N) begin
      failures++;
      $display("FAIL %0d pixels out", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
