// tb_llrf_top: end-to-end test of the whole controller at its default
// parameters, configured only through the AXI4-Lite port.
// The cavity model feeds the DAC code back to the pick-up ADC with gain 1/4
// and a delay that makes the loop rotation zero at fo = fs/8 (and so at 2fo
// and 3fo). The forward channel and the squared reference are synthesised
// from the testbench's own oscillators. Sequence and checks:
//  1. GDR: chain 0 must bring I/Q (read back) to the set points.
//     1b. With the cavity polarity inverted (180 degrees of loop phase),
//     a 180 degree rotation written to ROT0 must restore the lock.
//  2. GDR + tuner: a forward signal leading / lagging the pick-up by more
//     than the threshold must turn the tuner clockwise / counter-clockwise
//     with PWM on MOV.
//  3. GDR + DPLL on the external reference (12.125 MHz + 80 Hz): the phase
//     increment word read back must settle on the reference's word.
//  4. Sawtooth: each harmonic of the pick-up, measured by a DFT in the
//     testbench, must reach the amplitude its chain's set point asks for.
//  5. Output limiter: a low DAC limit must clip the drive (status bit, and
//     the DAC code never exceeds it).
//  6. SEL: the loop must self-oscillate at the amplitude limit.
//  7. SEL + DPLL on the pick-up: with a phase shift the oscillation moves
//     off fo; the DPLL must pull the DDS word after it and stop the drift.
//  8. SEL-AP: amplitude and phase must lock to their set points.
// Every mechanism is counted; one that never happened counts a failure.
module tb_llrf_top;
  import llrf_pkg::*;
  localparam int DLY = 3;   // + 5 register stages in the loop = 8 clocks
  localparam logic [31:0] FO = 32'h2000_0000;   // fs/8
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;

  logic signed [13:0] adc_pu = '0, adc_ref = '0;
  logic ext_ref = 1'b0;
  logic signed [13:0] dac_drive;
  logic tuner_mov, tuner_cw, tuner_ccw;
  logic [7:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 1'b0, s_axi_wvalid = 1'b0, s_axi_bready = 1'b0;
  logic s_axi_arvalid = 1'b0, s_axi_rready = 1'b0;
  logic [31:0] s_axi_wdata = '0;
  logic [3:0] s_axi_wstrb = '0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;

  llrf_top dut (.*);

  int checks = 0, failures = 0;
  int n_axi = 0, n_mode = 0, n_gdr_lock = 0, n_cw = 0, n_ccw = 0, n_mov = 0;
  int n_dpll_ref = 0, n_saw = 0, n_clip = 0, n_sel = 0, n_dpll_pu = 0, n_ap = 0, n_rot = 0;

  // ---------------- cavity, forward signal and reference ----------------
  logic signed [13:0] dl [DLY];
  logic [31:0] ref_acc = '0, ref_piw = FO, fwd_acc = '0;
  logic [15:0] fwd_off = '0;
  int dac_max = 0;
  bit inv = 1'b0;     // cavity polarity inverted: 180 degrees of loop phase
  always @(posedge clk) begin
    dl[0] <= dac_drive;
    for (int k = 1; k < DLY; k++) dl[k] <= dl[k-1];
    adc_pu <= inv ? -(dl[DLY-1] >>> 2) : dl[DLY-1] >>> 2;
    ref_acc <= ref_acc + ref_piw;
    ext_ref <= ref_acc[31];
    fwd_acc <= fwd_acc + FO;
    adc_ref <= 14'($rtoi(4000.0 * $cos(6.283185307179586 * real'(fwd_acc[31:16] + fwd_off) / 65536.0)));
    if (tuner_mov) n_mov++;
    if (dac_drive > dac_max) dac_max = dac_drive;
    if (-dac_drive > dac_max) dac_max = -dac_drive;
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    s_axi_awaddr <= a; s_axi_wdata <= d; s_axi_wstrb <= 4'hF;
    s_axi_awvalid <= 1'b1; s_axi_wvalid <= 1'b1; s_axi_bready <= 1'b1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 1'b0; s_axi_wvalid <= 1'b0;
    do @(posedge clk); while (!s_axi_bvalid);
    s_axi_bready <= 1'b0;
    n_axi++;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    s_axi_araddr <= a; s_axi_arvalid <= 1'b1; s_axi_rready <= 1'b1;
    do @(posedge clk); while (!s_axi_arready);
    s_axi_arvalid <= 1'b0;
    while (!s_axi_rvalid) @(posedge clk);
    d = s_axi_rdata;
    @(posedge clk);
    s_axi_rready <= 1'b0;
    n_axi++;
  endtask
  task automatic set_mode(input mode_e m, input bit dpll, input bit tuner);
    wr(8'h00, {27'd0, tuner, dpll, 1'b0, 2'(m)});
    n_mode++;
  endtask

  function automatic int sx(logic [31:0] v, int w);  // sign-extend a field
    return int'(v << (32 - w)) >>> (32 - w);
  endfunction
  function automatic bit close_to(longint v, longint t, longint tol);
    return v - t <= tol && t - v <= tol;
  endfunction

  // amplitude of harmonic h of the pick-up over 64 samples
  task automatic harmonic_amp(input int h, output real a);
    real si = 0.0, sq = 0.0;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      si += real'(adc_pu) * $cos(6.283185307179586 * real'(h * n) / 8.0);
      sq += real'(adc_pu) * $sin(6.283185307179586 * real'(h * n) / 8.0);
    end
    a = 2.0 * $sqrt(si * si + sq * sq) / 64.0;
  endtask

  logic [31:0] r, r2;
  real amp;

  initial begin
    for (int k = 0; k < DLY; k++) dl[k] = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    // common settings
    wr(8'h04, FO);                        // PIW_BASE
    wr(8'h10, {16'd256, 16'd64});          // chain 0 gains ki, kp
    wr(8'h1C, {16'd256, 16'd64});
    wr(8'h28, {16'd256, 16'd64});
    wr(8'h34, {16'd16, 16'd1024});         // DPLL gains
    // ---- 1. GDR
    wr(8'h08, 32'(20000)); wr(8'h0C, 32'(-12000));
    set_mode(MODE_GDR, 1'b0, 1'b0);
    repeat (60000) @(posedge clk);
    rd(8'h88, r); rd(8'h8C, r2);
    checks++;
    if (close_to(sx(r, 18), 20000, 200) && close_to(sx(r2, 18), -12000, 200)) n_gdr_lock++;
    else begin failures++; $display("GDR: I=%0d Q=%0d", sx(r, 18), sx(r2, 18)); end
    // ---- 1b. inverted cavity, compensated by the loop-phase rotation
    inv = 1'b1;
    wr(8'h5C, {16'd0, 16'h8001});            // ROT0: cos = -32767, sin = 0
    wr(8'h00, {27'd0, 2'b00, 1'b1, 2'(MODE_GDR)});   // clear the integrators
    wr(8'h08, 32'(-15000)); wr(8'h0C, 32'(18000));
    set_mode(MODE_GDR, 1'b0, 1'b0);
    repeat (60000) @(posedge clk);
    rd(8'h88, r); rd(8'h8C, r2);
    checks++;
    if (close_to(sx(r, 18), -15000, 200) && close_to(sx(r2, 18), 18000, 200)) n_rot++;
    else begin failures++; $display("GDR rotated: I=%0d Q=%0d", sx(r, 18), sx(r2, 18)); end
    inv = 1'b0;
    wr(8'h5C, 32'd32767);
    wr(8'h00, {27'd0, 2'b00, 1'b1, 2'(MODE_GDR)});
    wr(8'h08, 32'(20000)); wr(8'h0C, 32'(-12000));
    set_mode(MODE_GDR, 1'b0, 1'b0);
    repeat (20000) @(posedge clk);
    // ---- 2. tuner: forward leads the pick-up by 30 degrees, then lags
    wr(8'h50, 32'd1000);                   // threshold ~5.5 degrees
    wr(8'h54, 32'd0);
    set_mode(MODE_GDR, 1'b0, 1'b1);
    repeat (3000) @(posedge clk);
    rd(8'h98, r);                           // forward minus pick-up phase now
    fwd_off = -16'(r) + 16'd5461;
    repeat (3000) @(posedge clk);
    checks++;
    if (tuner_cw && !tuner_ccw) n_cw++; else begin failures++; $display("tuner not clockwise"); end
    fwd_off = -16'(r) - 16'd5461;
    repeat (3000) @(posedge clk);
    checks++;
    if (tuner_ccw && !tuner_cw) n_ccw++; else begin failures++; $display("tuner not counter-clockwise"); end
    fwd_off = -16'(r);
    repeat (3000) @(posedge clk);
    checks++;
    if (tuner_cw || tuner_ccw) begin failures++; $display("tuner moves inside the dead band"); end
    // ---- 3. DPLL on the external reference, at 12.125 MHz (a reference at
    // exactly fs/8 would be sampled into a fixed pattern)
    wr(8'h08, 32'(0)); wr(8'h0C, 32'(0));
    wr(8'h04, 32'd416611827);
    ref_piw = 32'd416611827 + 32'd2750;     // about 80 Hz above
    set_mode(MODE_GDR, 1'b1, 1'b0);
    repeat (500000) @(posedge clk);
    begin
      longint sum = 0;
      for (int n = 0; n < 256; n++) begin
        rd(8'h90, r);
        sum += longint'(r);
        repeat (500) @(posedge clk);
      end
      checks++;
      // the squared reference makes the word jitter; its mean must sit
      // within 5% of the 2750 LSB offset
      if (close_to(sum / 256, longint'(ref_piw), 140)) n_dpll_ref++;
      else begin failures++; $display("DPLL word %0d, reference %0d", sum / 256, ref_piw); end
      $display("DPLL: mean word offset from the reference %0d", sum / 256 - longint'(ref_piw));
    end
    set_mode(MODE_GDR, 1'b0, 1'b0);
    wr(8'h04, FO);
    // ---- 4. Sawtooth: three harmonics
    wr(8'h14, 32'(8000)); wr(8'h18, 32'(0));
    wr(8'h20, 32'(0));    wr(8'h24, 32'(-4000));
    wr(8'h08, 32'(16000)); wr(8'h0C, 32'(0));
    set_mode(MODE_SAW, 1'b0, 1'b0);
    repeat (80000) @(posedge clk);
    begin
      int sp [3] = '{16000, 8000, 4000};
      int ok = 0;
      for (int h = 1; h <= 3; h++) begin
        harmonic_amp(h, amp);
        checks++;
        // chain measurement = 16 x ADC amplitude (LO 32760 / 2 x 64 / 2^16)
        if (amp * 16.0 > real'(sp[h-1]) * 0.97 && amp * 16.0 < real'(sp[h-1]) * 1.03) ok++;
        else begin failures++; $display("harmonic %0d amplitude %f, expected %f", h, amp, real'(sp[h-1]) / 16.0); end
      end
      if (ok == 3) n_saw++;
    end
    // ---- 5. output limiter
    wr(8'h4C, 32'd1500);
    repeat (2000) @(posedge clk);
    dac_max = 0;
    repeat (2000) @(posedge clk);
    rd(8'h9C, r);
    checks++;
    if (r[0] && dac_max <= 1500) n_clip++;
    else begin failures++; $display("limiter: status %0d, max %0d", r, dac_max); end
    wr(8'h4C, 32'd8191);
    // ---- 6. SEL
    wr(8'h48, 32'd512);                    // loop gain 2
    wr(8'h44, 32'd28000);                  // amplitude limit
    set_mode(MODE_SEL, 1'b0, 1'b0);
    repeat (60000) @(posedge clk);
    rd(8'h80, r);
    checks++;
    if (close_to(r, 28000, 600)) n_sel++;
    else begin failures++; $display("SEL amplitude %0d", r); end
    // ---- 7. SEL with the DPLL following the pick-up
    wr(8'h34, {16'd2048, 16'd8192});
    wr(8'h40, 32'd300);                    // phase shift: oscillation moves off fo
    set_mode(MODE_SEL, 1'b1, 1'b0);
    repeat (400000) @(posedge clk);
    rd(8'h84, r);
    repeat (20000) @(posedge clk);
    rd(8'h84, r2);
    rd(8'h90, amp_word);
    checks++;
    if (close_to(sx(r2 - r, 16), 0, 200) && amp_word != FO) n_dpll_pu++;
    else begin failures++; $display("SEL DPLL: drift %0d word offset %0d", sx(r2 - r, 16), int'(amp_word - FO)); end
    // ---- 8. SEL-AP (DPLL on the reference, back at fo)
    wr(8'h40, 32'd0);
    ref_piw = FO;
    wr(8'h34, {16'd16, 16'd1024});
    wr(8'h38, 32'd24000); wr(8'h3C, 32'd8000);
    set_mode(MODE_SEL, 1'b0, 1'b0);         // empties the DPLL integrator
    wr(8'h2C, {16'd1024, 16'd0});          // amplitude loop: integral
    wr(8'h30, {16'd0, 16'd64});            // phase loop: proportional
    set_mode(MODE_SEL_AP, 1'b1, 1'b0);
    repeat (300000) @(posedge clk);
    rd(8'h80, r); rd(8'h84, r2);
    checks++;
    if (close_to(r, 24000, 500) && close_to(sx(r2 - 32'd8000, 16), 0, 300)) n_ap++;
    else begin failures++; $display("SEL-AP: amp %0d phase %0d", r, r2); end
    // ---- every mechanism must have happened
    checks++;
    if (n_axi == 0 || n_mode < 4 || n_gdr_lock == 0 || n_cw == 0 || n_ccw == 0 || n_mov == 0 ||
        n_dpll_ref == 0 || n_saw == 0 || n_clip == 0 || n_sel == 0 || n_dpll_pu == 0 || n_ap == 0 ||
        n_rot == 0)
      failures++;
    $display("count axi=%0d mode_switch=%0d gdr_lock=%0d tuner_cw=%0d tuner_ccw=%0d pwm_on=%0d dpll_ref=%0d sawtooth=%0d clip=%0d sel=%0d dpll_pu=%0d sel_ap=%0d loop_rot=%0d",
             n_axi, n_mode, n_gdr_lock, n_cw, n_ccw, n_mov, n_dpll_ref, n_saw, n_clip, n_sel, n_dpll_pu, n_ap, n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [31:0] amp_word;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
