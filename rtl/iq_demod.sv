// iq_demod: IQ demodulator.
//
// Multiplies each ADC sample x by the local oscillator: p_i = x*cos and
// p_q = -x*sin, registered once (latency 1 clock). For x = A*cos(wt+phi)
// against an LO at the same frequency the low-pass of (p_i, p_q) is
// (A*L/2)*(cos phi, sin phi). The block follows the controller's diagram;
// the sign convention and widths are this design's.
module iq_demod #(
  parameter int ADC_W = 14,
  parameter int LO_W  = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic signed [ADC_W-1:0]      x,
  input  logic signed [LO_W-1:0]       lo_cos,
  input  logic signed [LO_W-1:0]       lo_sin,
  output logic signed [ADC_W+LO_W-1:0] p_i,
  output logic signed [ADC_W+LO_W-1:0] p_q
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_i <= '0;
      p_q <= '0;
    end else begin
      p_i <= x * lo_cos;
      p_q <= -(x * lo_sin);
    end
  end
endmodule
