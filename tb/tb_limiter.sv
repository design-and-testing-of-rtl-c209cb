// tb_limiter: random inputs and limits (including limits above the DAC
// range); the output must be the input clipped to +/-min(lim, 8191) with
// `clip` set exactly when clipping, one clock later.
module tb_limiter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic signed [17:0] x = '0;
  logic [13:0] lim = '0;
  logic signed [13:0] y;
  logic clip;
  int checks = 0, failures = 0, nclip = 0;
  limiter #(.IN_W(18), .DAC_W(14)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic int xi = $urandom_range(40000, 0) - 20000;
      automatic int li = $urandom_range(16383, 0);
      automatic int l = li > 8191 ? 8191 : li;
      automatic int e = xi;
      automatic bit c = 0;
      if (xi > l) begin e = l; c = 1; end
      if (xi < -l) begin e = -l; c = 1; end
      x <= 18'(xi); lim <= 14'(li);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(y) != e || clip != c) begin
        failures++;
        if (failures < 5) $display("mismatch x=%0d lim=%0d: %0d exp %0d", xi, li, y, e);
      end
      if (clip) nclip++;
    end
    checks++;
    if (nclip == 0) failures++;
    $display("clip count %0d", nclip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
