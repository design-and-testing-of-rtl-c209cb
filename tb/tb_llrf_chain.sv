// tb_llrf_chain: closed-loop test of one feedback chain (harmonic 1, with
// the SEL path). The "cavity" is a pure gain of 1/4 with a delay chosen so
// that drive and pick-up are in phase at the test frequency (fs/8).
//  GDR: the IQ PI loops must bring the measured I/Q to the set points (1%).
//  GDR with loop rotation: three more clocks of cavity delay (-135 degrees
//       at fs/8) make the plain loop unstable; a +135 degree rotation of the
//       drive (cos -23170, sin 23170) must restore the lock at new set points.
//       (Run with +norot to see the uncompensated loop fail.)
//  SEL: with loop gain 2 the oscillation must grow to the amplitude limit
//       (limiter engaged) and its phase must stand still; a phase shift of
//       1000 must make the measured phase advance every update (the drive
//       follows the loop), by between 500 and 1000 per update.
//  SEL-AP: amplitude and phase PI loops must hold the set points.
//  Disabled: the output must go to zero.
module tb_llrf_chain;
  import llrf_pkg::*;
  localparam int DLY = 6;   // + modulator and ADC registers = 8 clocks = one period
  localparam logic [31:0] PIW = 32'h2000_0000;    // fs/8
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic signed [13:0] x = '0;
  logic en = 1'b0, clear = 1'b0;
  mode_e mode = MODE_GDR;
  chain_cfg_t ccfg;
  gains_t g_amp, g_ph;
  logic [17:0] amp_sp = '0, amp_lim = '0;
  logic [15:0] ph_sp = '0, ph_shift = '0, sel_gain = '0;
  logic signed [15:0] y;
  logic signed [15:0] lo_cos, lo_sin;
  logic meas_valid, pi_sat, sel_limited;
  logic [18:0] meas_amp;
  logic [15:0] meas_ph;
  logic signed [17:0] meas_i, meas_q;
  int checks = 0, failures = 0, n_upd = 0, n_lim = 0;

  llrf_chain #(.HARM(1), .HAS_SEL(1'b1), .DEC_LOG(6)) dut (.*, .piw(PIW));

  // cavity model: delayed drive times 1/4
  logic signed [15:0] dl [DLY+3];
  bit extra = 1'b0;   // three more clocks of delay: -135 degrees at fs/8
  always @(posedge clk) begin
    dl[0] <= y;
    for (int k = 1; k < DLY + 3; k++) dl[k] <= dl[k-1];
    x <= 14'((extra ? dl[DLY+2] : dl[DLY-1]) >>> 2);
    if (meas_valid) n_upd++;
    if (meas_valid && $test$plusargs("trace")) $display("t mode=%0d amp=%0d ph=%0d", mode, meas_amp, meas_ph);
    if (meas_valid && sel_limited) n_lim++;
  end

  function automatic bit close_to(longint v, longint t, longint tol);
    return v - t <= tol && t - v <= tol;
  endfunction
  function automatic int ph_diff(logic [15:0] a, logic [15:0] b);  // a-b, wrapped
    return int'($signed(16'(a - b)));
  endfunction

  initial begin
    for (int k = 0; k < DLY + 3; k++) dl[k] = '0;
    ccfg = '0; g_amp = '0; g_ph = '0;
    ccfg.rot_cos = 16'sd32767;   // no rotation
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // GDR
    ccfg.i_sp <= 18'sd20000; ccfg.q_sp <= -18'sd10000;
    ccfg.g.kp <= 16'd64; ccfg.g.ki <= 16'd256;
    en <= 1'b1;
    repeat (100000) @(posedge clk);
    checks++;
    if (!close_to(meas_i, 20000, 200) || !close_to(meas_q, -10000, 200)) begin
      failures++;
      $display("GDR: I=%0d Q=%0d", meas_i, meas_q);
    end else $display("GDR: locked I=%0d Q=%0d", meas_i, meas_q);
    // GDR through a -135 degree cavity path, compensated by +135 degrees
    extra <= 1'b1;
    if (!$test$plusargs("norot")) begin
      ccfg.rot_cos <= -16'sd23170; ccfg.rot_sin <= 16'sd23170;
    end
    ccfg.i_sp <= -18'sd15000; ccfg.q_sp <= 18'sd25000;
    clear <= 1'b1;
    repeat (200) @(posedge clk);
    clear <= 1'b0;
    repeat (100000) @(posedge clk);
    checks++;
    if (!close_to(meas_i, -15000, 200) || !close_to(meas_q, 25000, 200)) begin
      failures++;
      $display("GDR rotated: I=%0d Q=%0d", meas_i, meas_q);
    end else $display("GDR rotated: locked I=%0d Q=%0d", meas_i, meas_q);
    extra <= 1'b0;
    ccfg.rot_cos <= 16'sd32767; ccfg.rot_sin <= 16'sd0;
    // SEL, free running
    mode <= MODE_SEL; sel_gain <= 16'd512; amp_lim <= 18'd40000;
    repeat (50000) @(posedge clk);
    checks++;
    if (!close_to(meas_amp, 40000, 800) || n_lim == 0) begin
      failures++;
      $display("SEL: amp=%0d limited=%0d", meas_amp, n_lim);
    end else $display("SEL: amp=%0d held at the limit", meas_amp);
    // with no phase shift the loop phase stands still
    begin
      logic [15:0] p0;
      @(posedge meas_valid); @(negedge clk); p0 = meas_ph;
      repeat (16) @(posedge meas_valid);
      @(negedge clk);
      checks++;
      if (!close_to(ph_diff(meas_ph, p0), 0, 40)) begin
        failures++;
        $display("SEL phase drift %0d with no shift", ph_diff(meas_ph, p0));
      end
    end
    // a phase shift of 1000 makes the phase advance every update; the
    // measurement window overlaps the old and new drive, so the average step
    // lies between 1000/2 and 1000
    ph_shift <= 16'd1000;
    repeat (2000) @(posedge clk);
    begin
      logic [15:0] p0;
      int total;
      total = 0;
      @(posedge meas_valid); @(negedge clk); p0 = meas_ph;
      for (int n = 0; n < 16; n++) begin
        @(posedge meas_valid); @(negedge clk);
        total += ph_diff(meas_ph, p0);
        p0 = meas_ph;
      end
      checks++;
      if (total / 16 < 500 || total / 16 > 1000) begin
        failures++;
        $display("SEL phase step %0d", total / 16);
      end else $display("SEL: phase advances %0d per update", total / 16);
    end
    // SEL-AP
    ph_shift <= 16'd0;
    mode <= MODE_SEL_AP; amp_sp <= 18'd30000; ph_sp <= 16'd5000;
    g_amp.kp <= 16'd0; g_amp.ki <= 16'd1024;
    g_ph.kp <= 16'd64; g_ph.ki <= 16'd0;
    repeat (60000) @(posedge clk);
    checks++;
    if (!close_to(meas_amp, 30000, 600) || !close_to(ph_diff(meas_ph, 16'd5000), 0, 200)) begin
      failures++;
      $display("SEL-AP: amp=%0d ph=%0d", meas_amp, meas_ph);
    end else $display("SEL-AP: amp=%0d ph=%0d locked", meas_amp, meas_ph);
    // disable
    en <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (y != 0) failures++;
    checks++;
    if (n_upd < 1000) failures++;
    $display("count updates=%0d limited=%0d", n_upd, n_lim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
