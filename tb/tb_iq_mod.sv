// tb_iq_mod: random drive I/Q and LO values; the output must equal
// (i*cos - q*sin) >> 17 saturated to 16 bits, one clock later. Also checks
// a full-scale sum saturates.
module tb_iq_mod;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic signed [17:0] i_in = '0, q_in = '0;
  logic signed [15:0] lo_cos = '0, lo_sin = '0;
  logic signed [15:0] y;
  int checks = 0, failures = 0, sats = 0;
  iq_mod #(.IQ_W(18), .LO_W(16), .OUT_W(16), .SHIFT(17)) dut (.*);

  function automatic longint model(longint i, longint q, longint c, longint s);
    longint v = (i * c - q * s) >>> 17;
    if (v > 32767) return 32767;
    if (v < -32767) return -32767;
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic int ii = $urandom_range(262143, 0) - 131072;
      automatic int qq = $urandom_range(262143, 0) - 131072;
      automatic int ci = $urandom_range(65535, 0) - 32768;
      automatic int si = $urandom_range(65535, 0) - 32768;
      automatic longint e;
      if (n == 0) begin ii = 131071; qq = -131071; ci = 32767; si = 32767; end
      i_in <= 18'(ii); q_in <= 18'(qq); lo_cos <= 16'(ci); lo_sin <= 16'(si);
      e = model(ii, qq, ci, si);
      if (e == 32767 || e == -32767) sats++;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 5) $display("mismatch %0d %0d %0d %0d: %0d exp %0d", ii, qq, ci, si, y, e);
      end
    end
    checks++;
    if (sats == 0) failures++;
    $display("saturation count %0d", sats);
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
