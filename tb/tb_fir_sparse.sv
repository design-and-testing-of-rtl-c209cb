// tb_fir_sparse: random input stream; every output must equal the direct
// convolution with the 23-tap coefficient set (1 at delay 0, 2 at 11, 1 at
// 22, zero elsewhere) computed in the testbench, with 1 clock of latency.
// Also checks the DC gain of 4 with a constant input.
module tb_fir_sparse;
  localparam int TAPS = 23;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic signed [15:0] x = '0;
  logic signed [20:0] y;
  int checks = 0, failures = 0;
  fir_sparse #(.W(16), .TAPS(TAPS)) dut (.*);

  int hist [$];
  function automatic int h(int k);  // impulse response
    return (k == 0 || k == 22) ? 1 : (k == 11 ? 2 : 0);
  endfunction

  initial begin
    for (int k = 0; k < TAPS + 2; k++) hist.push_front(0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic int v = (n < 2500) ? $urandom_range(65535, 0) - 32768 : 1000;
      automatic int e = 0;
      x <= 16'(v);
      hist.push_front(v);
      void'(hist.pop_back());
      @(posedge clk);   // x enters the delay line; y holds the previous sample
      @(negedge clk);
      for (int k = 0; k < TAPS; k++) e += h(k) * hist[k+1];
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 5) $display("mismatch n=%0d: %0d exp %0d", n, y, e);
      end
    end
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (int'(y) != 4000) failures++;
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
