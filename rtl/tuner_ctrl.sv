// tuner_ctrl: PWM-driven motorised frequency tuner controller (GDR mode).
//
// On every new phase measurement the error e = fwd_ph - pu_ph - ph_offset
// (wrapping, signed) is compared with a threshold: e > thr selects clockwise,
// e < -thr counter-clockwise, and inside the dead band the motor stops.
// While a direction is selected, `mov` carries a PWM of period 2^PWM_W clocks
// and duty duty/2^PWM_W. Outputs are registered. Comparing the forward/pick-
// up phase error with a threshold to choose the direction, and PWM drive,
// follow the controller; the sign convention, dead band and PWM period are
// this design's.
module tuner_ctrl #(
  parameter int PH_W  = 16,
  parameter int PWM_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             ph_valid,
  input  logic [PH_W-1:0]  fwd_ph,
  input  logic [PH_W-1:0]  pu_ph,
  input  logic [PH_W-1:0]  ph_offset,
  input  logic [PH_W-1:0]  thr,
  input  logic [PWM_W-1:0] duty,
  output logic             mov,
  output logic             cw,
  output logic             ccw,
  output logic [PH_W-1:0]  err
);
  logic signed [PH_W-1:0] e;
  logic signed [PH_W:0]   t;
  logic [PWM_W-1:0]       cnt;
  assign e = signed'(fwd_ph - pu_ph - ph_offset);
  assign t = signed'({1'b0, thr});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cw <= 1'b0; ccw <= 1'b0; err <= '0; cnt <= '0; mov <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      mov <= (cw || ccw) && (cnt < duty);
      if (!en) begin
        cw <= 1'b0; ccw <= 1'b0;
      end else if (ph_valid) begin
        err <= e;
        cw  <= ((PH_W+1)'(e) > t);
        ccw <= ((PH_W+1)'(e) < -t);
      end
    end
  end
endmodule
