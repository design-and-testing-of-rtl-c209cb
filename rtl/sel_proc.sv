// sel_proc: self-excited-loop processing in the amplitude/phase domain
// ("phase pass" with amplitude limiter and phase shifter).
//
// Free-running SEL (ap_mode = 0): the measured phase of the cavity pick-up is
// passed through with a programmable phase shift, so the drive follows the
// cavity at its own resonance; the drive amplitude is the measured amplitude
// times `gain` (2^-8 units), clipped at amp_lim - a limiter that lets a weak
// signal grow and then holds the drive constant.
// SEL-AP (ap_mode = 1): the amplitude is the amplitude PI output clipped to
// [0, amp_lim], and the phase PI output is added to the shifted phase.
// Latency 1 clock (out_valid follows in_valid). The phase-pass structure
// follows the controller; the limiter law and the SEL-AP combination are
// this design's reading of it.
module sel_proc #(
  parameter int A_W  = 19,
  parameter int O_W  = 18,
  parameter int PH_W = 16,
  parameter int G_W  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [A_W-1:0]         amp_in,
  input  logic [PH_W-1:0]        ph_in,
  input  logic                   ap_mode,
  input  logic [G_W-1:0]         gain,
  input  logic [O_W-1:0]         amp_lim,
  input  logic [PH_W-1:0]        ph_shift,
  input  logic signed [O_W-1:0]  amp_pi,
  input  logic signed [O_W-1:0]  ph_pi,
  output logic                   out_valid,
  output logic [O_W-1:0]         amp_out,
  output logic [PH_W-1:0]        ph_out,
  output logic                   limited
);
  localparam int MW = A_W + G_W;
  logic [MW-1:0] scaled;
  logic [MW-1:0] lim_w;
  assign scaled = (MW'(amp_in) * MW'(gain)) >> 8;
  assign lim_w  = MW'(amp_lim);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      amp_out <= '0;
      ph_out <= '0;
      limited <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (!ap_mode) begin
          ph_out <= ph_in + ph_shift;
          if (scaled > lim_w) begin
            amp_out <= amp_lim;  limited <= 1'b1;
          end else begin
            amp_out <= O_W'(scaled); limited <= 1'b0;
          end
        end else begin
          ph_out <= ph_in + ph_shift + PH_W'(ph_pi);
          if (amp_pi < 0) begin
            amp_out <= '0;  limited <= 1'b1;
          end else if (O_W'(amp_pi) > amp_lim) begin
            amp_out <= amp_lim;  limited <= 1'b1;
          end else begin
            amp_out <= O_W'(amp_pi); limited <= 1'b0;
          end
        end
      end
    end
  end
endmodule
