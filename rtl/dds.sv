// dds: direct digital synthesiser for one harmonic of fo.
//
// A PIW_W-bit phase accumulator advances by HARM*piw each clock, so all DDS
// instances fed with the same word and released from reset together stay
// phase-coherent at fo, 2fo and 3fo. The top PH_W accumulator bits drive a
// rotation CORDIC with a fixed amplitude to give cosine and sine.
// Timing: lo_cos/lo_sin follow the accumulator by the CORDIC latency; the
// output `phase` is delayed to match them. The harmonic set (fo, 2fo, 3fo)
// and the tuning-word control follow the controller; the CORDIC sine source
// and widths are this design's choice.
module dds
#(
  parameter int HARM  = 1,
  parameter int PIW_W = 32,
  parameter int LO_W  = 16,
  parameter int PH_W  = 16,
  parameter int ITER  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [PIW_W-1:0]       piw,
  output logic signed [LO_W-1:0] lo_cos,
  output logic signed [LO_W-1:0] lo_sin,
  output logic [PH_W-1:0]        phase
);
  localparam logic [LO_W-1:0] LO_AMP = LO_W'((1 << (LO_W-1)) - 8);

  logic [PIW_W-1:0] acc;
  logic [PIW_W-1:0] step;
  assign step = PIW_W'(HARM) * piw;

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc + step;
  end

  logic vout;
  cordic_rot #(.W(LO_W), .PH_W(PH_W), .ITER(ITER)) u_cordic (
    .clk, .rst_n,
    .in_valid (1'b1),
    .amp      (LO_AMP),
    .phase    (acc[PIW_W-1 -: PH_W]),
    .out_valid(vout),
    .i_out    (lo_cos),
    .q_out    (lo_sin)
  );

  // phase aligned with the CORDIC output
  logic [PH_W-1:0] ph_d [ITER+1];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k <= ITER; k++) ph_d[k] <= '0;
    end else begin
      ph_d[0] <= acc[PIW_W-1 -: PH_W];
      for (int k = 1; k <= ITER; k++) ph_d[k] <= ph_d[k-1];
    end
  end
  assign phase = ph_d[ITER];
endmodule
