// mode_mux: mode multiplexer and sawtooth broadcaster at the chain inputs.
//
// Sawtooth: the pick-up sample is broadcast to all three harmonic chains.
// GDR, SEL, SEL-AP: only chain 0 receives the pick-up; chains 1 and 2 get
// zero and are disabled. The second ADC channel is routed to the forward-
// phase path, and the tuner is enabled, in GDR mode only. In free-running
// SEL the DPLL is told to lock to the pick-up phase; in every other mode it
// locks to the external reference. Registered, latency 1 clock.
// The three input routes follow the controller's diagram; the mode encoding
// is this design's.
module mode_mux
  import llrf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  mode_e                   mode,
  input  logic signed [ADC_W-1:0] adc_pu,
  input  logic signed [ADC_W-1:0] adc_ref,
  output logic signed [ADC_W-1:0] chain_x [3],
  output logic [2:0]              chain_en,
  output logic signed [ADC_W-1:0] fwd_x,
  output logic                    tuner_en,
  output logic                    dpll_use_pu
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) chain_x[k] <= '0;
      chain_en <= '0; fwd_x <= '0; tuner_en <= 1'b0; dpll_use_pu <= 1'b0;
    end else begin
      chain_x[0]  <= adc_pu;
      dpll_use_pu <= (mode == MODE_SEL);
      tuner_en    <= (mode == MODE_GDR);
      fwd_x       <= (mode == MODE_GDR) ? adc_ref : '0;
      if (mode == MODE_SAW) begin
        chain_x[1] <= adc_pu;
        chain_x[2] <= adc_pu;
        chain_en   <= 3'b111;
      end else begin
        chain_x[1] <= '0;
        chain_x[2] <= '0;
        chain_en   <= 3'b001;
      end
    end
  end
endmodule
