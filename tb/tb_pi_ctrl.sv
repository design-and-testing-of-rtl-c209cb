// tb_pi_ctrl: drives random errors and gains with irregular valid strobes,
// and compares u and sat with an integer model of the PI law
// (integrator += ki*e, clamped; u = kp*e/256 + integrator/4096, clamped).
// Also checks that a long one-sided error saturates without wind-up (the
// output leaves saturation right after the error changes sign) and that
// `clear` empties the integrator. out_valid must follow in_valid by 1 clock.
module tb_pi_ctrl;
  localparam int E_W = 18, OUT_W = 18;
  localparam longint UMAX = (1 << (OUT_W - 1)) - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic clear = 1'b0, in_valid = 1'b0;
  logic signed [E_W-1:0] err = '0;
  logic [15:0] kp = '0, ki = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] u;
  logic sat;
  int checks = 0, failures = 0, nsat = 0;
  pi_ctrl #(.E_W(E_W), .G_W(16), .OUT_W(OUT_W), .KP_SHIFT(8), .KI_SHIFT(12)) dut (.*);

  longint integ = 0, eu = 0;
  bit esat;
  task automatic step(input longint e, input int p, input int i);
    longint in2;
    err <= E_W'(e); kp <= 16'(p); ki <= 16'(i); in_valid <= 1'b1;
    in2 = integ + e * i;
    if (in2 > (UMAX << 12)) in2 = UMAX << 12;
    if (in2 < -(UMAX << 12)) in2 = -(UMAX << 12);
    integ = in2;
    eu = ((e * p) >>> 8) + (in2 >>> 12);
    esat = 0;
    if (eu > UMAX) begin eu = UMAX; esat = 1; end
    if (eu < -UMAX) begin eu = -UMAX; esat = 1; end
    @(posedge clk);
    in_valid <= 1'b0;
    @(negedge clk);
    checks++;
    if (!out_valid || longint'(u) != eu || sat != esat) begin
      failures++;
      if (failures < 5) $display("mismatch e=%0d kp=%0d ki=%0d: u=%0d exp %0d sat=%b", e, p, i, u, eu, sat);
    end
    if (sat) nsat++;
    @(negedge clk);
    checks++;
    if (out_valid) failures++;   // strobe lasts one clock
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++)
      step($urandom_range(2000, 0) - 1000, $urandom_range(2048, 0), $urandom_range(512, 0));
    // wind-up test: long positive error saturates, then a small negative one
    for (int n = 0; n < 200; n++) step(100000, 256, 4096);
    step(-10, 0, 4096);
    checks++;
    if (sat) begin failures++; $display("integrator wound up"); end
    // clear
    clear <= 1'b1; @(posedge clk); clear <= 1'b0; integ = 0;
    step(0, 256, 16);
    checks++;
    if (u != 0) failures++;
    checks++;
    if (nsat == 0) failures++;
    $display("saturation count %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
