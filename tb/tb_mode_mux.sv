// tb_mode_mux: for each mode, random ADC samples must reach the chains,
// the forward path, the tuner enable and the DPLL source as the mode
// defines (sawtooth broadcasts to three chains, the others use chain 0),
// one clock later.
module tb_mode_mux;
  import llrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #4 clk = ~clk;
  mode_e mode = MODE_SAW;
  logic signed [13:0] adc_pu = '0, adc_ref = '0;
  logic signed [13:0] chain_x [3];
  logic [2:0] chain_en;
  logic signed [13:0] fwd_x;
  logic tuner_en, dpll_use_pu;
  int checks = 0, failures = 0;
  mode_mux dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 2000; n++) begin
      automatic mode_e m = mode_e'(n % 4);
      automatic logic signed [13:0] a = 14'($urandom), b = 14'($urandom);
      automatic bit saw = (m == MODE_SAW);
      mode <= m; adc_pu <= a; adc_ref <= b;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (chain_x[0] != a || chain_x[1] != (saw ? a : 14'sd0) || chain_x[2] != (saw ? a : 14'sd0) ||
          chain_en != (saw ? 3'b111 : 3'b001) || fwd_x != (m == MODE_GDR ? b : 14'sd0) ||
          tuner_en != (m == MODE_GDR) || dpll_use_pu != (m == MODE_SEL)) begin
        failures++;
        if (failures < 5) $display("mismatch in mode %0d", m);
      end
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
