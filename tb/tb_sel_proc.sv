// tb_sel_proc: random measurements in both SEL sub-modes. Free SEL: phase out
// = phase in + shift, amplitude = min(amp*gain/256, limit). SEL-AP: amplitude
// = PI output clipped to [0, limit], phase out = phase in + shift + phase PI.
// Results must appear one clock after in_valid; the limiter must engage.
module tb_sel_proc;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  logic in_valid = 1'b0, ap_mode = 1'b0;
  logic [18:0] amp_in = '0;
  logic [15:0] ph_in = '0, ph_shift = '0, gain = '0;
  logic [17:0] amp_lim = '0;
  logic signed [17:0] amp_pi = '0, ph_pi = '0;
  logic out_valid, limited;
  logic [17:0] amp_out;
  logic [15:0] ph_out;
  int checks = 0, failures = 0, nlim = 0;
  sel_proc #(.A_W(19), .O_W(18), .PH_W(16), .G_W(16)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic bit ap = n[0];
      automatic longint a = $urandom_range(300000, 0);
      automatic longint g = $urandom_range(1024, 0);
      automatic longint l = $urandom_range(131071, 1);
      automatic int p = $urandom_range(65535, 0), s = $urandom_range(65535, 0);
      automatic int api = $urandom_range(200000, 0) - 70000;
      automatic int ppi = $urandom_range(4000, 0) - 2000;
      automatic longint ea, ep;
      automatic bit el;
      ap_mode <= ap; amp_in <= 19'(a); gain <= 16'(g); amp_lim <= 18'(l);
      ph_in <= 16'(p); ph_shift <= 16'(s); amp_pi <= 18'(api); ph_pi <= 18'(ppi);
      in_valid <= 1'b1;
      if (!ap) begin
        ea = (a * g) >> 8; el = ea > l; if (el) ea = l;
        ep = (p + s) % 65536;
      end else begin
        ea = api; el = 0;
        if (ea < 0) begin ea = 0; el = 1; end
        else if (ea > l) begin ea = l; el = 1; end
        ep = (p + s + ppi + 65536 * 2) % 65536;
      end
      @(posedge clk);
      in_valid <= 1'b0;
      @(negedge clk);
      checks++;
      if (!out_valid || longint'(amp_out) != ea || longint'(ph_out) != ep || limited != el) begin
        failures++;
        if (failures < 5) $display("mismatch ap=%0d: amp %0d exp %0d ph %0d exp %0d", ap, amp_out, ea, ph_out, ep);
      end
      if (limited) nlim++;
    end
    checks++;
    if (nlim == 0) failures++;
    $display("limiter count %0d", nlim);
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
