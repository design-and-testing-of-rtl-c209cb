// combiner: adds the modulated outputs of the enabled chains.
//
// In sawtooth mode the three harmonic chains (fo, 2fo, 3fo) are summed into
// one drive waveform; in the single-chain modes only chain 0 is enabled.
// The sum is N+... bits wide so it never overflows; registered, latency 1.
// Named in the controller's diagram; a plain unweighted sum is this design's
// choice.
module combiner #(
  parameter int N    = 3,
  parameter int IN_W = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 en,
  input  logic signed [IN_W-1:0]       y_in [N],
  output logic signed [IN_W+$clog2(N):0] sum
);
  localparam int SW = IN_W + $clog2(N) + 1;
  logic signed [SW-1:0] s;
  always_comb begin
    s = '0;
    for (int k = 0; k < N; k++)
      if (en[k]) s = s + SW'(y_in[k]);
  end
  always_ff @(posedge clk) begin
    if (!rst_n) sum <= '0;
    else        sum <= s;
  end
endmodule
