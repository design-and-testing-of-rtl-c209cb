// cordic_rot: pipelined rotation-mode CORDIC, amplitude/phase -> I/Q.
//
// i_out = amp*cos(phase), q_out = amp*sin(phase). The amplitude is first
// multiplied by the inverse CORDIC gain (0.60725), the phase is reduced to
// the first quadrant by a 0/90/180/270 degree pre-rotation, and ITER
// shift-and-add micro-rotations follow, one per pipeline stage.
// Latency: ITER+1 clocks from in_valid to out_valid, fully pipelined (one
// conversion per clock). amp must be non-negative and below 2^(W-1).
// The controller uses CORDIC to go between the IQ and amplitude/phase
// domains; the pipeline organisation and iteration count are this design's.
module cordic_rot
#(
  parameter int W    = 18,
  parameter int PH_W = 16,
  parameter int ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [W-1:0]        amp,
  input  logic [PH_W-1:0]     phase,
  output logic                out_valid,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);
  localparam int IW = W + 5;      // 3 fraction bits and guard bits
  localparam int ZW = PH_W + 6;   // angle with 6 fraction bits

  logic signed [IW-1:0] x [ITER+1];
  logic signed [IW-1:0] y [ITER+1];
  logic signed [ZW:0]   z [ITER+1];
  logic [ITER:0]        v;

  // stage 0: gain compensation and quadrant pre-rotation
  logic [W+16:0] amp_scaled;
  logic signed [IW-1:0] a0;
  logic [PH_W-1:0] zr;
  assign amp_scaled = {1'b0, amp} * (W+17)'(llrf_pkg::CORDIC_INV_GAIN);
  assign a0 = IW'(amp_scaled >> 13);
  assign zr = {2'b00, phase[PH_W-3:0]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
      x[0] <= '0; y[0] <= '0; z[0] <= '0;
    end else begin
      v[0] <= in_valid;
      z[0] <= {1'b0, zr, 6'b0};
      unique case (phase[PH_W-1:PH_W-2])
        2'd0: begin x[0] <= a0;  y[0] <= '0;  end
        2'd1: begin x[0] <= '0;  y[0] <= a0;  end
        2'd2: begin x[0] <= -a0; y[0] <= '0;  end
        default: begin x[0] <= '0; y[0] <= -a0; end
      endcase
    end
  end

  for (genvar k = 0; k < ITER; k++) begin : g_stage
    localparam logic [ZW:0] ANG = (ZW+1)'(llrf_pkg::atan_turn(k) >> (32 - ZW));
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        v[k+1] <= 1'b0;
        x[k+1] <= '0; y[k+1] <= '0; z[k+1] <= '0;
      end else begin
        v[k+1] <= v[k];
        if (!z[k][ZW]) begin  // residual angle >= 0: rotate forward
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

  function automatic logic signed [W-1:0] sat(input logic signed [IW-1:0] x3);
    localparam logic signed [IW-1:0] MX = IW'((1 << (W-1)) - 1);
    logic signed [IW-1:0] a;
    a = (x3 + IW'(4)) >>> 3;  // drop the fraction bits, rounded
    if (a > MX)  return W'(MX);
    if (a < -MX) return W'(-MX);
    return W'(a);
  endfunction

  assign out_valid = v[ITER];
  assign i_out     = sat(x[ITER]);
  assign q_out     = sat(y[ITER]);
endmodule
