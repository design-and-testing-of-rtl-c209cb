// cordic_vec: pipelined vectoring-mode CORDIC, I/Q -> amplitude/phase.
//
// amp = sqrt(I^2+Q^2) (CORDIC gain removed), phase = atan2(Q, I) as an
// unsigned fraction of a turn (2^PH_W = 360 degrees). A vector in the left
// half-plane is first turned by 180 degrees; ITER micro-rotations then drive
// Q to zero while accumulating the angle; a final stage multiplies by the
// inverse gain. Latency: ITER+2 clocks, one conversion per clock.
// The controller uses it on the down-converted pick-up (SEL mode), on the
// DPLL mixer output and on the forward signal; the pipeline is this design's.
module cordic_vec
#(
  parameter int W    = 18,
  parameter int PH_W = 16,
  parameter int ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic                out_valid,
  output logic [W:0]          amp,
  output logic [PH_W-1:0]     phase
);
  localparam int IW = W + 6;      // 3 fraction bits and guard bits
  localparam int ZW = PH_W + 6;   // angle with 6 fraction bits

  logic signed [IW-1:0] x [ITER+1];
  logic signed [IW-1:0] y [ITER+1];
  logic [ZW-1:0]        z [ITER+1];
  logic [ITER:0]        v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
      x[0] <= '0; y[0] <= '0; z[0] <= '0;
    end else begin
      v[0] <= in_valid;
      if (i_in < 0) begin
        x[0] <= -(IW'(i_in) <<< 3);
        y[0] <= -(IW'(q_in) <<< 3);
        z[0] <= ZW'(1) << (ZW - 1);  // 180 degrees
      end else begin
        x[0] <= IW'(i_in) <<< 3;
        y[0] <= IW'(q_in) <<< 3;
        z[0] <= '0;
      end
    end
  end

  for (genvar k = 0; k < ITER; k++) begin : g_stage
    localparam logic [ZW-1:0] ANG = ZW'(llrf_pkg::atan_turn(k) >> (32 - ZW));
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        v[k+1] <= 1'b0;
        x[k+1] <= '0; y[k+1] <= '0; z[k+1] <= '0;
      end else begin
        v[k+1] <= v[k];
        if (y[k] < 0) begin  // rotate forward to raise y to zero
          x[k+1] <= x[k] - (y[k] >>> k);
          y[k+1] <= y[k] + (x[k] >>> k);
          z[k+1] <= z[k] - ANG;
        end else begin
          x[k+1] <= x[k] + (y[k] >>> k);
          y[k+1] <= y[k] - (x[k] >>> k);
          z[k+1] <= z[k] + ANG;
        end
      end
    end
  end

  // gain compensation
  logic [IW+16:0] prod;
  assign prod = (IW+17)'(unsigned'(x[ITER])) * (IW+17)'(llrf_pkg::CORDIC_INV_GAIN);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      amp       <= '0;
      phase     <= '0;
    end else begin
      out_valid <= v[ITER];
      amp       <= (W+1)'((prod + (IW+17)'(1 << 18)) >> 19);
      phase     <= PH_W'((z[ITER] + ZW'(32)) >> 6);  // rounded
    end
  end
endmodule
