// pi_ctrl: proportional-integral controller with anti-windup.
//
// On each in_valid the integrator adds ki*err (ki in units of 2^-KI_SHIFT)
// and the output becomes kp*err*2^-KP_SHIFT plus the integrator, saturated
// to +/-(2^(OUT_W-1)-1). The integrator itself is clamped to the same range
// so it cannot wind up; `clear` empties it. out_valid follows in_valid by
// one clock. Gains are unsigned; the sign of the loop is set by how the
// caller forms err (set point minus measurement). The controller specifies
// PI control with set point, Kp and Ki; number formats are this design's.
module pi_ctrl #(
  parameter int E_W      = 18,
  parameter int G_W      = 16,
  parameter int OUT_W    = 18,
  parameter int KP_SHIFT = 8,
  parameter int KI_SHIFT = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [E_W-1:0]   err,
  input  logic [G_W-1:0]          kp,
  input  logic [G_W-1:0]          ki,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] u,
  output logic                    sat
);
  localparam int PW = E_W + G_W + 1;
  localparam int IW = OUT_W + KI_SHIFT + 2;
  localparam int SW = (PW > IW ? PW : IW) + 2;
  localparam logic signed [SW-1:0] UMAX = SW'((1 << (OUT_W-1)) - 1);
  localparam logic signed [SW-1:0] IMAX = UMAX <<< KI_SHIFT;

  logic signed [IW-1:0] integ;
  logic signed [PW-1:0] p_term, i_term;
  logic signed [SW-1:0] integ_next, u_next;

  assign p_term = err * $signed({1'b0, kp});
  assign i_term = err * $signed({1'b0, ki});

  always_comb begin
    integ_next = SW'(integ) + SW'(i_term);
    if (integ_next > IMAX)  integ_next = IMAX;
    if (integ_next < -IMAX) integ_next = -IMAX;
    u_next = (SW'(p_term) >>> KP_SHIFT) + (integ_next >>> KI_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      integ <= '0;
      u <= '0;
      sat <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ <= IW'(integ_next);
        if (u_next > UMAX) begin
          u <= OUT_W'(UMAX);  sat <= 1'b1;
        end else if (u_next < -UMAX) begin
          u <= OUT_W'(-UMAX); sat <= 1'b1;
        end else begin
          u <= OUT_W'(u_next); sat <= 1'b0;
        end
      end
    end
  end
endmodule
