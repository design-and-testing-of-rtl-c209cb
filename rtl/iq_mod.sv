// iq_mod: IQ modulator (up-conversion of the drive).
//
// y = (i*cos - q*sin) >> SHIFT, saturated to OUT_W bits, registered (latency
// 1 clock). With the demodulator's sign convention a drive (I, Q) =
// A*(cos phi, sin phi) becomes A*cos(wt+phi), so a pick-up that equals the
// drive is measured back as the same (I, Q). Structure per the controller's
// diagram; scaling and widths are this design's.
module iq_mod #(
  parameter int IQ_W  = 18,
  parameter int LO_W  = 16,
  parameter int OUT_W = 16,
  parameter int SHIFT = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IQ_W-1:0]  i_in,
  input  logic signed [IQ_W-1:0]  q_in,
  input  logic signed [LO_W-1:0]  lo_cos,
  input  logic signed [LO_W-1:0]  lo_sin,
  output logic signed [OUT_W-1:0] y
);
  localparam int PW = IQ_W + LO_W + 1;
  localparam logic signed [PW-1:0] MX = PW'((1 << (OUT_W-1)) - 1);
  logic signed [PW-1:0] s;
  assign s = (PW'(i_in * lo_cos) - PW'(q_in * lo_sin)) >>> SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n)        y <= '0;
    else if (s > MX)   y <= OUT_W'(MX);
    else if (s < -MX)  y <= OUT_W'(-MX);
    else               y <= OUT_W'(s);
  end
endmodule
