// image_fusion_top_tb: end-to-end test of the RGB image fusion pipeline.
//
// Sends several frames of two RGB images (random texture, flat black and
// white patches, sharp edges) of different lengths, including one of a
// single pixel, with random idle cycles on the input. For every colour
// plane it builds the expected fused image with the reference model
// (forward (9,7) transform of both images, average of the coefficients,
// inverse transform, clamp) and requires an exact match, plus a match with
// the plain pixel average to within two steps. It also checks that each
// frame returns exactly its pixel count with out_last on the last one, and
// that output pixel i leaves 11 cycles after stream element i + 8 entered.
// Mechanisms counted, each of which must occur: input idle cycles, input
// held off while the frame is flushed, flush samples, leading outputs
// dropped, filter restarts between frames. Clamped pixels are counted but
// not required: the rounding error of the whole chain stays well below half
// a step, so the fused average of two valid images never leaves 0..255 (the
// clamp is exercised by the inverse-transform test).
module image_fusion_top_tb;
  import dwt_pkg::*;
  import wavelet_ref_pkg::*;

  localparam int CH = 3;
  localparam int NFRAMES = 5;
  localparam int LENS [NFRAMES] = '{37, 120, 1, 64, 91};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [CH-1:0][7:0] img1_pix = '0, img2_pix = '0;
  logic out_valid, out_last;
  logic [CH-1:0][7:0] out_pix;
  logic [CH-1:0] out_sat;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_idle = 0, n_held = 0, n_pad = 0, n_drop = 0, n_sat = 0, n_restart = 0;

  image_fusion_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_last, .img1_pix, .img2_pix,
                        .out_valid, .out_last, .out_pix, .out_sat);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected output of the frame being checked.
  int_q exp_pix [CH];
  int_q p1 [CH], p2 [CH];
  int   feed_cyc[$];
  int   n_out = 0;
  bit   frame_done = 0;
  bit   waiting = 0;   // a frame has been sent and not yet returned in full

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (!waiting || n_out >= exp_pix[0].size()) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        for (int c = 0; c < CH; c++) begin
          int avg, d;
          checks += 2;
          if (int'(out_pix[c]) != exp_pix[c][n_out]) begin
            failures++;
            $display("FAIL ch%0d pixel %0d: got %0d exp %0d", c, n_out, out_pix[c], exp_pix[c][n_out]);
          end
          avg = (p1[c][n_out] + p2[c][n_out]) / 2;
          d = int'(out_pix[c]) - avg;
          if (d > 2 || d < -2) begin
            failures++;
            $display("FAIL ch%0d pixel %0d: %0d far from average %0d", c, n_out, out_pix[c], avg);
          end
          if (out_sat[c]) n_sat++;
        end
        if (cyc - feed_cyc[n_out + 8] != 11) begin
          failures++;
          $display("FAIL latency %0d at pixel %0d", cyc - feed_cyc[n_out + 8], n_out);
        end
        checks++;
        if (out_last != (n_out == exp_pix[0].size() - 1)) begin
          failures++;
          $display("FAIL out_last at %0d", n_out);
        end
        n_out++;
        if (out_last) frame_done = 1;
      end
    end
  end

  // Pixels offered while the top is flushing or restarting.
  always @(posedge clk) begin
    if (rst_n && !in_ready) begin
      if (in_valid) n_held++;
    end
  end

  function automatic int pixel(input int f, input int i, input bit img);
    int k = i % 40;
    if (f == 4) return (k < 20) ? 0 : 255;             // hard edges between the extremes
    if (k < 6)  return 0;                               // black patch in both
    if (k < 10) return img ? 255 : 0;                   // one bright, one dark
    return int'($urandom_range(0, 255));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      automatic int n = LENS[f];
      automatic bit gaps = (f != 1);
      for (int c = 0; c < CH; c++) begin
        p1[c].delete(); p2[c].delete();
        for (int i = 0; i < n; i++) begin
          p1[c].push_back(pixel(f, i, 1'b0));
          p2[c].push_back(pixel(f, (f == 4) ? i + 3 : i, 1'b1));
        end
        begin
          int_q a, b, fu, r;
          a  = dwt(p1[c], n + 8);
          b  = dwt(p2[c], n + 8);
          fu = fuse(a, b);
          r  = idwt(fu);
          exp_pix[c].delete();
          for (int i = 0; i < n; i++) exp_pix[c].push_back(r[i + 8]);
        end
      end
      feed_cyc.delete();
      n_out = 0;
      frame_done = 0;
      waiting = 1;
      for (int i = 0; i < n; i++) begin
        bit acc;
        while (gaps && $urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 0;
          n_idle++;
          @(posedge clk);
        end
        do begin
          @(negedge clk);
          in_valid = 1;
          in_last  = (i == n - 1);
          for (int c = 0; c < CH; c++) begin
            img1_pix[c] = 8'(p1[c][i]);
            img2_pix[c] = 8'(p2[c][i]);
          end
          acc = in_ready;
          @(posedge clk);
        end while (!acc);
        feed_cyc.push_back(cyc);
      end
      // The flush samples enter on the next 8 cycles.
      for (int k = 1; k <= 8; k++) feed_cyc.push_back(feed_cyc[n - 1] + k);
      // Keep offering the next frame's first pixel to see it held off.
      @(negedge clk);
      in_last = 0;
      in_valid = (f < NFRAMES - 1);
      for (int k = 0; k < 8; k++) begin
        @(posedge clk);
        if (!in_ready) n_pad++;
      end
      @(negedge clk);
      in_valid = 0;
      // A frame whose last pixel does not come back within its length plus
      // a margin is reported and ends the test.
      for (int t = 0; !frame_done; t++) begin
        if (t > n + 100) begin
          failures++;
          $display("FAIL frame %0d: only %0d of %0d pixels returned", f, n_out, n);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
        @(posedge clk);
      end
      n_drop += 8;  // stream elements 0..7 of the inverse transform are not shown
      checks++;
      if (n_out != n) begin
        failures++;
        $display("FAIL frame %0d: %0d of %0d pixels", f, n_out, n);
      end
      waiting = 0;
      if (f > 0) n_restart++;
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
    $display("idle=%0d held=%0d flush=%0d dropped=%0d clamped=%0d restarts=%0d",
             n_idle, n_held, n_pad, n_drop, n_sat, n_restart);
    checks++;
    if (n_idle == 0 || n_held == 0 || n_pad == 0 || n_drop == 0 || n_restart == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
