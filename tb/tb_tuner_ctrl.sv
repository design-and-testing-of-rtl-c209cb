// tb_tuner_ctrl: sets forward/pick-up phases above, below and inside the
// dead band (including across the 0/360 degree wrap) and checks the
// direction outputs; then measures the PWM duty of `mov` over whole periods
// (must equal duty/256) and checks that `en` low stops the motor.
module tb_tuner_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic en = 1'b0, ph_valid = 1'b0;
  logic [15:0] fwd_ph = '0, pu_ph = '0, ph_offset = '0, thr = '0;
  logic [7:0] duty = '0;
  logic mov, cw, ccw;
  logic [15:0] err;
  int checks = 0, failures = 0, n_cw = 0, n_ccw = 0, n_stop = 0;
  tuner_ctrl #(.PH_W(16), .PWM_W(8)) dut (.*);

  task automatic meas(input int f, input int p, input int o, input int t);
    automatic int e = (f - p - o) & 16'hFFFF;
    automatic int es = e >= 32768 ? e - 65536 : e;
    fwd_ph <= 16'(f); pu_ph <= 16'(p); ph_offset <= 16'(o); thr <= 16'(t);
    ph_valid <= 1'b1;
    @(posedge clk);
    ph_valid <= 1'b0;
    @(negedge clk);
    checks++;
    if (cw != (es > t) || ccw != (es < -t) || int'(err) != e) begin
      failures++;
      if (failures < 5) $display("mismatch e=%0d thr=%0d: cw=%b ccw=%b", es, t, cw, ccw);
    end
    if (cw) n_cw++; else if (ccw) n_ccw++; else n_stop++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    en <= 1'b1;
    duty <= 8'd64;
    for (int n = 0; n < 1000; n++)
      meas($urandom_range(65535, 0), $urandom_range(65535, 0), $urandom_range(65535, 0), $urandom_range(20000, 0));
    meas(100, 65500, 0, 50);   // +136 across the wrap: clockwise
    meas(65500, 100, 0, 50);   // -136 across the wrap: counter-clockwise
    meas(1000, 1010, 0, 50);   // inside the dead band
    // PWM duty with a direction selected
    meas(5000, 0, 0, 100);
    for (int d = 0; d < 256; d += 37) begin
      automatic int hi = 0;
      duty <= 8'(d);
      repeat (512) @(posedge clk);
      for (int k = 0; k < 256 * 4; k++) begin
        @(negedge clk);
        if (mov) hi++;
      end
      checks++;
      if (hi != 4 * d) begin
        failures++;
        $display("duty %0d gave %0d high of 1024", d, hi);
      end
    end
    en <= 1'b0;
    repeat (300) @(posedge clk);
    checks++;
    if (mov || cw || ccw) failures++;
    checks++;
    if (n_cw == 0 || n_ccw == 0 || n_stop == 0) failures++;
    $display("count cw=%0d ccw=%0d stop=%0d", n_cw, n_ccw, n_stop);
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
