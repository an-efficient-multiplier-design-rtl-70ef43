// fold97_filter_tb: streams random signed samples, with random idle cycles,
// through the folded filter (forward coefficient sets) and compares every
// full-precision output with a direct 9-term sum. Checks that each output
// comes exactly 5 cycles after its sample, that the even/odd flag
// alternates, and that clr restarts the stream from an empty window. The
// samples stay within +-16000 so that pre-adder sums fit 16 bits.
module fold97_filter_tb;
  import dwt_pkg::*;
  import wavelet_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic signed [15:0] in_data = '0;
  logic out_valid, out_odd;
  logic signed [34:0] out_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  fold97_filter dut (.clk, .rst_n, .clr, .in_valid, .in_data, .out_valid, .out_odd, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int_q samples;       // samples of the current stream
  int   issue_cyc[$];  // cycle each sample entered
  int   n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e;
      e = tap_sum(1'b0, samples, n_out);
      checks += 3;
      if (longint'(out_data) != e) begin
        failures++;
        $display("FAIL out %0d: got %0d exp %0d", n_out, out_data, e);
      end
      if (out_odd != n_out[0]) begin
        failures++;
        $display("FAIL parity at %0d", n_out);
      end
      if (cyc - issue_cyc[n_out] != 5) begin
        failures++;
        $display("FAIL latency %0d", cyc - issue_cyc[n_out]);
      end
      n_out++;
    end
  end

  task automatic run_stream(input int n, input int span);
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data  <= 16'($urandom_range(0, 2 * span) - span);
      @(posedge clk);
      samples.push_back(int'(in_data));
      issue_cyc.push_back(cyc);
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_stream(300, 16000);
    checks++;
    if (n_out != 300) begin
      failures++;
      $display("FAIL %0d outputs for 300 samples", n_out);
    end
    // Restart: the window must be empty again.
    clr <= 1'b1;
    @(posedge clk);
    clr <= 1'b0;
    samples.delete();
    issue_cyc.delete();
    n_out = 0;
    run_stream(200, 255);
    checks++;
    if (n_out != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
