// limiter: output limiter in front of the RF drive DAC.
//
// Clips the combined drive symmetrically to +/-lim (lim is clamped to the DAC
// range 2^(DAC_W-1)-1) and flags every clipped sample on `clip`. Registered,
// latency 1 clock. Named in the controller's diagram; the symmetric law is
// this design's choice.
module limiter #(
  parameter int IN_W  = 18,
  parameter int DAC_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic [DAC_W-1:0]        lim,
  output logic signed [DAC_W-1:0] y,
  output logic                    clip
);
  localparam logic [DAC_W-1:0] FS = DAC_W'((1 << (DAC_W-1)) - 1);
  logic signed [IN_W-1:0] l;
  assign l = (lim > FS) ? IN_W'(FS) : IN_W'(lim);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0; clip <= 1'b0;
    end else if (x > l) begin
      y <= DAC_W'(l);  clip <= 1'b1;
    end else if (x < -l) begin
      y <= DAC_W'(-l); clip <= 1'b1;
    end else begin
      y <= DAC_W'(x);  clip <= 1'b0;
    end
  end
endmodule
