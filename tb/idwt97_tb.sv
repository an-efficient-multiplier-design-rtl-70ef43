// idwt97_tb: builds the (9,7) forward transform of random and flat pixel
// rows with the reference model, streams it through the inverse transform
// and checks (a) every output against a direct synthesis sum, rounded and
// clamped, (b) that the rebuilt pixels match the original ones to within
// one step, (c) 5 cycles of latency. A second stream of large random
// coefficients drives the output into both clamps.
module idwt97_tb;
  import dwt_pkg::*;
  import wavelet_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic signed [15:0] in_coef = '0;
  logic out_valid, out_sat;
  logic [7:0] out_pix;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_sat_lo = 0, n_sat_hi = 0;

  idwt97 dut (.clk, .rst_n, .clr, .in_valid, .in_coef, .out_valid, .out_pix, .out_sat);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int_q pix, cf;
  int   issue_cyc[$];
  int   n_out = 0;
  bit   recon = 1;   // compare with the original pixels

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int raw, e, d;
      raw = idwt_raw(cf, n_out);
      e   = clamp8(raw);
      checks += 2;
      if (int'(out_pix) != e || out_sat != (raw != e)) begin
        failures++;
        $display("FAIL out %0d: got %0d sat %0d exp %0d (raw %0d)", n_out, out_pix, out_sat, e, raw);
      end
      if (cyc - issue_cyc[n_out] != 5) begin
        failures++;
        $display("FAIL latency %0d", cyc - issue_cyc[n_out]);
      end
      if (out_sat && raw < 0) n_sat_lo++;
      if (out_sat && raw > 255) n_sat_hi++;
      if (recon && n_out >= 8 && n_out - 8 < pix.size()) begin
        d = int'(out_pix) - pix[n_out-8];
        checks++;
        if (d > 1 || d < -1) begin
          failures++;
          $display("FAIL reconstruction at %0d: %0d vs %0d", n_out - 8, out_pix, pix[n_out-8]);
        end
      end
      n_out++;
    end
  end

  task automatic stream(input bit gaps);
    for (int i = 0; i < cf.size(); i++) begin
      while (gaps && $urandom_range(0, 3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_coef  <= 16'(cf[i]);
      @(posedge clk);
      issue_cyc.push_back(cyc);
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 300; i++) pix.push_back((i >= 100 && i < 140) ? 0 :
                                               (i >= 140 && i < 180) ? 255 : int'($urandom_range(0, 255)));
    cf = dwt(pix, pix.size() + 8);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    stream(1'b1);
    checks++;
    if (n_out != cf.size()) begin
      failures++;
      $display("FAIL %0d outputs", n_out);
    end
    // Large coefficients: no pixel row behind them, exercises the clamps.
    clr <= 1'b1;
    @(posedge clk);
    clr <= 1'b0;
    recon = 0;
    cf.delete();
    issue_cyc.delete();
    n_out = 0;
    for (int i = 0; i < 200; i++) cf.push_back(int'($urandom_range(0, 14000)) - 7000);
    stream(1'b0);
    checks++;
    if (n_sat_lo == 0 || n_sat_hi == 0) begin
      failures++;
      $display("FAIL clamps not reached: low %0d high %0d", n_sat_lo, n_sat_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
