// tb_cordic_rot: streams random amplitude/phase pairs into the rotation
// CORDIC, one per clock, and compares each output, exactly ITER+1 clocks
// later, with amp*cos and amp*sin computed in floating point (+/-6 LSB, the residual angle of 16 iterations).
module tb_cordic_rot;
  localparam int W = 18, PH_W = 16, ITER = 16, LAT = ITER + 1, N = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic in_valid = 1'b0;
  logic [W-1:0] amp = '0;
  logic [PH_W-1:0] phase = '0;
  logic out_valid;
  logic signed [W-1:0] i_out, q_out;
  int checks = 0, failures = 0;
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  cordic_rot #(.W(W), .PH_W(PH_W), .ITER(ITER)) dut (.*);

  real ei [N], eq [N];
  int sent = 0, got = 0, cyc = 0, first_in = -1, first_out = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (rabs(real'(i_out) - ei[got]) > 6.0 || rabs(real'(q_out) - eq[got]) > 6.0) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: got %0d,%0d exp %f,%f", got, i_out, q_out, ei[got], eq[got]);
      end
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (sent < N) begin
      automatic logic [W-1:0] a = W'($urandom_range((1 << (W-1)) - 2, 0));
      automatic logic [PH_W-1:0] p = PH_W'($urandom);
      if (sent < 4) p = PH_W'(sent * 16384);  // quadrant corners
      ei[sent] = real'(a) * $cos(2.0 * 3.14159265358979 * real'(p) / 65536.0);
      eq[sent] = real'(a) * $sin(2.0 * 3.14159265358979 * real'(p) / 65536.0);
      amp <= a; phase <= p; in_valid <= 1'b1;
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
