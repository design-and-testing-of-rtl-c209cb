// tb_ddc: feeds random products (and a full-scale run that must saturate)
// into the integrate-and-dump filter; every output must equal the sum of the
// last 64 inputs shifted right by 16 and saturated, and strobes must come
// exactly every 64 clocks; one strobe per window must appear at all.
module tb_ddc;
  localparam int DEC_LOG = 6, N = 1 << DEC_LOG;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic in_valid = 1'b0;
  logic signed [29:0] p_i = '0, p_q = '0;
  logic out_valid;
  logic signed [17:0] i_out, q_out;
  int checks = 0, failures = 0, sats = 0;
  ddc #(.IN_W(30), .OUT_W(18), .DEC_LOG(DEC_LOG)) dut (.*);

  longint si = 0, sq = 0;
  longint ei = 0, eq = 0;
  int cnt = 0, last_strobe = -1, cyc = 0, strobes = 0;
  function automatic longint sat(longint v);
    v = v >>> 16;
    if (v > 131071) return 131071;
    if (v < -131071) return -131071;
    return v;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      strobes++;
      checks++;
      if (longint'(i_out) != ei || longint'(q_out) != eq) begin
        failures++;
        if (failures < 5) $display("mismatch %0d %0d exp %0d %0d", i_out, q_out, ei, eq);
      end
      if (last_strobe >= 0) begin
        checks++;
        if (cyc - last_strobe != N) begin
          failures++;
          $display("strobe period %0d", cyc - last_strobe);
        end
      end
      last_strobe = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    in_valid <= 1'b1;
    for (int n = 0; n < N * 60; n++) begin
      automatic int a = $urandom_range(1 << 29, 0) - (1 << 28);
      automatic int b = $urandom_range(1 << 29, 0) - (1 << 28);
      if (n >= N * 50) begin a = 30'h1FFFFFFF; b = -30'sh1FFFFFFF; end  // full scale
      p_i <= 30'(a); p_q <= 30'(b);
      si += a; sq += b;
      cnt++;
      if (cnt == N) begin
        ei = sat(si); eq = sat(sq);
        if (ei == 131071 || eq == -131071) sats++;
        si = 0; sq = 0; cnt = 0;
      end
      @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (sats == 0) failures++;
    $display("saturation count %0d", sats);
    // one output per 64-sample window must have appeared
    checks++;
    if (strobes < 59) begin
      failures++;
      $display("only %0d strobes", strobes);
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
