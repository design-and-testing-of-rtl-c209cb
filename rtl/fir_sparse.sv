// fir_sparse: sparse 23-tap FIR low-pass of the DPLL.
//
// y[n] = sum over k of COEF[k]*x[n-k] for k = 0..TAPS-1. Only taps with a
// non-zero coefficient cost an adder; the default keeps three (1, 2, 1 at
// delays 0, 11 and 22), a comb whose response falls to zero at fs/22 and
// its odd multiples. One register stage on the output: latency 1 clock
// after the sample enters the delay line. The tap count of 23 and the
// sparseness follow the controller; the coefficients are this design's.
module fir_sparse #(
  parameter int W    = 16,
  parameter int TAPS = 23,
  parameter int CW   = 4,
  parameter int OW   = W + 5,
  parameter logic signed [CW-1:0] COEF [TAPS] =
    '{4'sd1, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0,
      4'sd0, 4'sd2, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0, 4'sd0,
      4'sd0, 4'sd0, 4'sd1}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  x,
  output logic signed [OW-1:0] y
);
  logic signed [W-1:0] dl [TAPS];
  logic signed [OW-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dl[k] <= '0;
    end else begin
      dl[0] <= x;
      for (int k = 1; k < TAPS; k++) dl[k] <= dl[k-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      if (COEF[k] != 0) acc = acc + OW'(dl[k] * COEF[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= acc;
  end
endmodule
