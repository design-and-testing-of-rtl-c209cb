// dpll: lightweight digital PLL that trims the phase increment word.
//
// The external reference arrives as a two-level (squared) signal on a GPIO
// pin. It is mapped to +/-1 and "mixed" with the DPLL's own DDS at HARM*fo
// by inverting the sign of the LO cosine and sine - no multiplier. Each
// product goes through the sparse 23-tap FIR low-pass and an
// integrate-and-dump decimator (2^DEC_LOG), and a vectoring CORDIC gives
// the reference phase relative to the LO. In free-running SEL (use_pu = 1)
// the phase of the pick-up measured by chain 0 is used instead. A slow PI
// controller turns (phase - ph_sp) into a correction that is added to the
// software word piw_base; the sum is the phase increment word of every DDS,
// so the whole controller follows the reference (or the cavity).
// The DPLL's own DDS runs from the same word and the same reset as the chain
// DDSs and so stays coherent with them. With en = 0 the correction is held
// at zero. piw updates one clock after each PI update.
// Structure (two-level input, sign-inversion mixing, 23-tap sparse FIR,
// CORDIC, PI, DDS 3fo) follows the controller; the decimator, the
// coefficients and all widths are this design's.
module dpll
  import llrf_pkg::*;
#(
  parameter int HARM    = 3,
  parameter int DEC_LOG = 6,
  parameter int CORR_W  = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ext_ref,
  input  logic              use_pu,
  input  logic              pu_valid,
  input  logic [PH_W-1:0]   pu_ph,
  input  logic              en,
  input  logic [PIW_W-1:0]  piw_base,
  input  logic [PH_W-1:0]   ph_sp,
  input  gains_t            g,
  output logic [PIW_W-1:0]  piw,
  output logic [PH_W-1:0]   ph_err,
  output logic              upd
);
  localparam int FW = LO_W + 5;

  logic signed [LO_W-1:0] lo_cos, lo_sin;
  dds #(.HARM(HARM), .PIW_W(PIW_W), .LO_W(LO_W), .PH_W(PH_W)) u_dds (
    .clk, .rst_n, .piw, .lo_cos, .lo_sin, .phase());

  // unipolar -> bipolar, and sign inversion of the LO
  logic bip;
  logic signed [LO_W-1:0] m_i, m_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bip <= 1'b0; m_i <= '0; m_q <= '0;
    end else begin
      bip <= ext_ref;
      m_i <= bip ? lo_cos : -lo_cos;
      m_q <= bip ? -lo_sin : lo_sin;
    end
  end

  logic signed [FW-1:0] f_i, f_q;
  fir_sparse #(.W(LO_W), .OW(FW)) u_fir_i (.clk, .rst_n, .x(m_i), .y(f_i));
  fir_sparse #(.W(LO_W), .OW(FW)) u_fir_q (.clk, .rst_n, .x(m_q), .y(f_q));

  logic dv;
  logic signed [IQ_W-1:0] d_i, d_q;
  ddc #(.IN_W(FW), .OUT_W(IQ_W), .DEC_LOG(DEC_LOG), .SHIFT(DEC_LOG)) u_dec (
    .clk, .rst_n, .in_valid(1'b1), .p_i(f_i), .p_q(f_q),
    .out_valid(dv), .i_out(d_i), .q_out(d_q));

  logic cv;
  logic [PH_W-1:0] ref_ph;
  cordic_vec #(.W(IQ_W), .PH_W(PH_W)) u_cordic (
    .clk, .rst_n, .in_valid(dv), .i_in(d_i), .q_in(d_q),
    .out_valid(cv), .amp(), .phase(ref_ph));

  // phase source selection (SEL | Sawtooth/GDR)
  logic            sv;
  logic [PH_W-1:0] sph;
  assign sv  = use_pu ? pu_valid : cv;
  assign sph = use_pu ? pu_ph : ref_ph;

  logic signed [PH_W-1:0] err;
  assign err = signed'(sph - ph_sp);

  logic pv;
  logic signed [CORR_W-1:0] corr;
  pi_ctrl #(.E_W(PH_W), .G_W(G_W), .OUT_W(CORR_W)) u_pi (
    .clk, .rst_n, .clear(!en), .in_valid(sv), .err, .kp(g.kp), .ki(g.ki),
    .out_valid(pv), .u(corr), .sat());

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      piw <= '0; ph_err <= '0; upd <= 1'b0;
    end else begin
      upd <= pv;
      piw <= en ? piw_base + PIW_W'(corr) : piw_base;  // corr sign-extended
      if (sv) ph_err <= err;
    end
  end
endmodule
