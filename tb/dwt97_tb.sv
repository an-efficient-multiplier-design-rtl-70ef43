// dwt97_tb: streams 8-bit pixels (random, plus flat black and white runs)
// into the forward (9,7) transform with random idle cycles. Every output
// must appear on Y_L for even and on Y_H for odd stream positions, 5 cycles
// after its pixel, with the value of a direct lowpass/highpass sum rounded
// to Q.4. A flat run must give a zero highpass band.
module dwt97_tb;
  import dwt_pkg::*;
  import wavelet_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic [7:0] in_pix = '0;
  logic yl_valid, yh_valid;
  logic signed [15:0] yl, yh;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_low = 0, n_high = 0, flat_zero = 0;

  dwt97 dut (.clk, .rst_n, .clr, .in_valid, .in_pix, .yl_valid, .yl, .yh_valid, .yh);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int_q pix;
  int   issue_cyc[$];
  int   n_out = 0;

  always @(posedge clk) begin
    if (rst_n && (yl_valid || yh_valid)) begin
      int e, got;
      e   = int'((tap_sum(1'b0, pix, n_out) + 512) >>> 10);
      got = yh_valid ? int'(yh) : int'(yl);
      checks += 3;
      if (yl_valid && yh_valid) begin
        failures++;
        $display("FAIL both bands valid");
      end
      if (yh_valid != n_out[0]) begin
        failures++;
        $display("FAIL band order at %0d", n_out);
      end
      if (got != e || cyc - issue_cyc[n_out] != 5) begin
        failures++;
        $display("FAIL out %0d: got %0d exp %0d latency %0d", n_out, got, e, cyc - issue_cyc[n_out]);
      end
      if (yl_valid) n_low++; else n_high++;
      // Inside a flat run of 200s the highpass band must vanish.
      if (yh_valid && n_out >= 108 && n_out < 148) begin
        checks++;
        flat_zero++;
        if (yh != 0) begin
          failures++;
          $display("FAIL flat highpass %0d at %0d", yh, n_out);
        end
      end
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      while ($urandom_range(0, 4) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      if (i >= 100 && i < 160)      in_pix <= 8'd200;
      else if (i >= 200 && i < 230) in_pix <= (i[0] ? 8'd255 : 8'd0);
      else                          in_pix <= 8'($urandom);
      @(posedge clk);
      pix.push_back(int'(in_pix));
      issue_cyc.push_back(cyc);
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_low != 200 || n_high != 200 || flat_zero == 0) begin
      failures++;
      $display("FAIL counts low=%0d high=%0d flat=%0d", n_low, n_high, flat_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
