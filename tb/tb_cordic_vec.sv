// tb_cordic_vec: streams random I/Q pairs (all four quadrants) into the
// vectoring CORDIC and compares amplitude (+/-4 LSB) and phase (+/-3 LSB of
// 2^-16 turn) with sqrt and atan2 computed in floating point; checks the
// ITER+2 clock latency.
module tb_cordic_vec;
  localparam int W = 18, PH_W = 16, ITER = 16, LAT = ITER + 2, N = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic in_valid = 1'b0;
  logic signed [W-1:0] i_in = '0, q_in = '0;
  logic out_valid;
  logic [W:0] amp;
  logic [PH_W-1:0] phase;
  int checks = 0, failures = 0;
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  cordic_vec #(.W(W), .PH_W(PH_W), .ITER(ITER)) dut (.*);

  real ea [N], ep [N];
  int sent = 0, got = 0, cyc = 0, first_in = -1, first_out = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      automatic real dp;
      if (first_out < 0) first_out = cyc;
      dp = real'(phase) - ep[got];
      if (dp > 32768.0) dp -= 65536.0;
      if (dp < -32768.0) dp += 65536.0;
      checks++;
      if (rabs(real'(amp) - ea[got]) > 4.0 || rabs(dp) > 3.0) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: amp %0d exp %f ph %0d exp %f", got, amp, ea[got], phase, ep[got]);
      end
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (sent < N) begin
      automatic int a = $urandom_range(120000, 4000);
      automatic real th = 2.0 * 3.14159265358979 * real'($urandom_range(65535, 0)) / 65536.0;
      automatic int ii = int'(real'(a) * $cos(th));
      automatic int qq = int'(real'(a) * $sin(th));
      automatic real p = $atan2(real'(qq), real'(ii)) / (2.0 * 3.14159265358979) * 65536.0;
      if (p < 0.0) p += 65536.0;
      ea[sent] = $sqrt(real'(ii) * real'(ii) + real'(qq) * real'(qq));
      ep[sent] = p;
      i_in <= W'(ii); q_in <= W'(qq); in_valid <= 1'b1;
      if (first_in < 0) first_in = cyc + 1;  // sampled at the next edge
      sent++;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (got != N) failures++;
    checks++;
    if (first_out - first_in != LAT) begin
      failures++;
      $display("latency %0d expected %0d", first_out - first_in, LAT);
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
