// tb_iq_demod: random samples and LO values; each product must equal
// x*cos and -x*sin exactly, one clock after the inputs are applied.
module tb_iq_demod;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic signed [13:0] x = '0;
  logic signed [15:0] lo_cos = '0, lo_sin = '0;
  logic signed [29:0] p_i, p_q;
  int checks = 0, failures = 0;
  iq_demod #(.ADC_W(14), .LO_W(16)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2000) begin
      automatic int xi = $urandom_range(16383, 0) - 8192;
      automatic int ci = $urandom_range(65535, 0) - 32768;
      automatic int si = $urandom_range(65535, 0) - 32768;
      x <= 14'(xi); lo_cos <= 16'(ci); lo_sin <= 16'(si);
      @(posedge clk);   // applied
      @(negedge clk);   // registered at this edge
      checks++;
      if (p_i != 30'(longint'(xi) * ci) || p_q != 30'(-longint'(xi) * si)) begin
        failures++;
        if (failures < 5) $display("mismatch x=%0d c=%0d s=%0d: %0d %0d", xi, ci, si, p_i, p_q);
      end
    end
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
