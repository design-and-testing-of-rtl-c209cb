// tb_combiner: random chain outputs and enable patterns; the sum of the
// enabled inputs must appear one clock later.
module tb_combiner;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic [2:0] en = '0;
  logic signed [15:0] y_in [3];
  logic signed [18:0] sum;
  int checks = 0, failures = 0;
  combiner #(.N(3), .IN_W(16)) dut (.*);

  initial begin
    for (int k = 0; k < 3; k++) y_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 2000; n++) begin
      automatic int v [3];
      automatic int e = $urandom_range(7, 0);
      automatic int s = 0;
      for (int k = 0; k < 3; k++) begin
        v[k] = $urandom_range(65535, 0) - 32768;
        y_in[k] <= 16'(v[k]);
        if (e[k]) s += v[k];
      end
      en <= 3'(e);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(sum) != s) begin
        failures++;
        if (failures < 5) $display("mismatch en=%0d: %0d exp %0d", e, sum, s);
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
