// llrf_chain: one feedback chain of the controller at harmonic HARM of fo.
//
// Receive side: DDS (HARM*fo) -> IQ demodulator -> integrate-and-dump
// down-conversion (2^DEC_LOG) -> vectoring CORDIC (amplitude, phase).
// Control, chosen by `mode`:
//  * Sawtooth / GDR - two PI loops in the IQ domain (I_SP - I, Q_SP - Q)
//    give the drive I and Q, rotated by the loop-phase angle whose cos and
//    sin (2^-15 units) software writes, to cancel the phase of the cavity
//    path; the rotation is done as the drive register loads, so it adds
//    no clock of latency.
//  * SEL (HAS_SEL = 1) - phase pass: measured phase + phase shift, amplitude
//    through the limiter; a rotation CORDIC returns to I and Q.
//  * SEL-AP (HAS_SEL = 1) - as SEL, with the amplitude taken from an
//    amplitude PI loop and a phase PI correction added to the phase.
// Transmit side: IQ modulator with the same DDS -> y. Loops that are not in
// use have their integrators held at zero; a disabled chain outputs zero.
// Timing: measurements and PI updates come once every 2^DEC_LOG clocks;
// meas_* are valid with meas_valid (CORDIC latency after the DDC strobe).
// The chain's structure follows the controller's algorithm diagram; the
// IQ/polar control split for SEL-AP, the filter and the widths are this
// design's.
module llrf_chain
  import llrf_pkg::*;
#(
  parameter int HARM    = 1,
  parameter bit HAS_SEL = 1'b1,
  parameter int DEC_LOG = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] x,
  input  logic                    en,
  input  mode_e                   mode,
  input  logic                    clear,
  input  logic [PIW_W-1:0]        piw,
  input  chain_cfg_t              ccfg,
  input  gains_t                  g_amp,
  input  gains_t                  g_ph,
  input  logic [IQ_W-1:0]         amp_sp,
  input  logic [PH_W-1:0]         ph_sp,
  input  logic [PH_W-1:0]         ph_shift,
  input  logic [IQ_W-1:0]         amp_lim,
  input  logic [G_W-1:0]          sel_gain,
  output logic signed [Y_W-1:0]   y,
  output logic signed [LO_W-1:0]  lo_cos,
  output logic signed [LO_W-1:0]  lo_sin,
  output logic                    meas_valid,
  output logic [AMP_W-1:0]        meas_amp,
  output logic [PH_W-1:0]         meas_ph,
  output logic signed [IQ_W-1:0]  meas_i,
  output logic signed [IQ_W-1:0]  meas_q,
  output logic                    pi_sat,
  output logic                    sel_limited
);
  localparam int PW = ADC_W + LO_W;

  logic sel_mode, ap_mode;
  assign sel_mode = HAS_SEL && (mode == MODE_SEL || mode == MODE_SEL_AP);
  assign ap_mode  = HAS_SEL && (mode == MODE_SEL_AP);

  dds #(.HARM(HARM), .PIW_W(PIW_W), .LO_W(LO_W), .PH_W(PH_W)) u_dds (
    .clk, .rst_n, .piw, .lo_cos, .lo_sin, .phase());

  logic signed [PW-1:0] p_i, p_q;
  iq_demod #(.ADC_W(ADC_W), .LO_W(LO_W)) u_demod (
    .clk, .rst_n, .x, .lo_cos, .lo_sin, .p_i, .p_q);

  logic dv;
  logic signed [IQ_W-1:0] d_i, d_q;
  ddc #(.IN_W(PW), .OUT_W(IQ_W), .DEC_LOG(DEC_LOG)) u_ddc (
    .clk, .rst_n, .in_valid(1'b1), .p_i, .p_q,
    .out_valid(dv), .i_out(d_i), .q_out(d_q));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meas_i <= '0; meas_q <= '0;
    end else if (dv) begin
      meas_i <= d_i; meas_q <= d_q;
    end
  end

  cordic_vec #(.W(IQ_W), .PH_W(PH_W)) u_vec (
    .clk, .rst_n, .in_valid(dv), .i_in(d_i), .q_in(d_q),
    .out_valid(meas_valid), .amp(meas_amp), .phase(meas_ph));

  // IQ-domain PI loops (Sawtooth / GDR)
  logic clr_iq;
  assign clr_iq = clear || !en || sel_mode;
  logic pv_i, pv_q, sat_i, sat_q;
  logic signed [IQ_W-1:0] u_i, u_q;
  logic signed [IQ_W:0] e_i, e_q;
  assign e_i = (IQ_W+1)'(ccfg.i_sp) - (IQ_W+1)'(d_i);
  assign e_q = (IQ_W+1)'(ccfg.q_sp) - (IQ_W+1)'(d_q);
  pi_ctrl #(.E_W(IQ_W+1), .G_W(G_W), .OUT_W(IQ_W)) u_pi_i (
    .clk, .rst_n, .clear(clr_iq), .in_valid(dv), .err(e_i),
    .kp(ccfg.g.kp), .ki(ccfg.g.ki), .out_valid(pv_i), .u(u_i), .sat(sat_i));
  pi_ctrl #(.E_W(IQ_W+1), .G_W(G_W), .OUT_W(IQ_W)) u_pi_q (
    .clk, .rst_n, .clear(clr_iq), .in_valid(dv), .err(e_q),
    .kp(ccfg.g.kp), .ki(ccfg.g.ki), .out_valid(pv_q), .u(u_q), .sat(sat_q));

  // loop-phase rotation: (u_i + j u_q) * (rot_cos + j rot_sin) / 2^15
  localparam int RW = IQ_W + LO_W + 1;
  localparam logic signed [RW-1:0] U_MAX = RW'((1 << (IQ_W-1)) - 1);
  logic signed [RW-1:0] rp_i, rp_q, ur_i, ur_q;
  always_comb begin
    rp_i = (RW'(u_i) * RW'(ccfg.rot_cos) - RW'(u_q) * RW'(ccfg.rot_sin)) >>> (LO_W-1);
    rp_q = (RW'(u_i) * RW'(ccfg.rot_sin) + RW'(u_q) * RW'(ccfg.rot_cos)) >>> (LO_W-1);
    ur_i = (rp_i > U_MAX) ? U_MAX : (rp_i < -U_MAX) ? -U_MAX : rp_i;
    ur_q = (rp_q > U_MAX) ? U_MAX : (rp_q < -U_MAX) ? -U_MAX : rp_q;
  end

  logic signed [IQ_W-1:0] drv_i, drv_q;

  if (HAS_SEL) begin : g_sel
    logic clr_ap;
    assign clr_ap = clear || !en || !ap_mode;
    logic signed [AMP_W:0] e_a;
    logic signed [PH_W-1:0] e_p;
    assign e_a = (AMP_W+1)'(amp_sp) - (AMP_W+1)'(meas_amp);
    assign e_p = signed'(ph_sp - meas_ph);
    logic pv_a, pv_p;  // equal to mv_d while the loops run
    logic signed [IQ_W-1:0] u_a, u_p;
    pi_ctrl #(.E_W(AMP_W+1), .G_W(G_W), .OUT_W(IQ_W)) u_pi_amp (
      .clk, .rst_n, .clear(clr_ap), .in_valid(meas_valid), .err(e_a),
      .kp(g_amp.kp), .ki(g_amp.ki), .out_valid(pv_a), .u(u_a), .sat());
    pi_ctrl #(.E_W(PH_W), .G_W(G_W), .OUT_W(IQ_W)) u_pi_ph (
      .clk, .rst_n, .clear(clr_ap), .in_valid(meas_valid), .err(e_p),
      .kp(g_ph.kp), .ki(g_ph.ki), .out_valid(pv_p), .u(u_p), .sat());

    // hold the measurement one clock so it lines up with the PI outputs
    logic [AMP_W-1:0] amp_d;
    logic [PH_W-1:0]  ph_d;
    logic             mv_d;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        amp_d <= '0; ph_d <= '0; mv_d <= 1'b0;
      end else begin
        mv_d <= meas_valid;
        if (meas_valid) begin
          amp_d <= meas_amp; ph_d <= meas_ph;
        end
      end
    end

    logic sv;
    logic [IQ_W-1:0] s_amp;
    logic [PH_W-1:0] s_ph;
    sel_proc #(.A_W(AMP_W), .O_W(IQ_W), .PH_W(PH_W), .G_W(G_W)) u_sel (
      .clk, .rst_n, .in_valid(mv_d), .amp_in(amp_d), .ph_in(ph_d),
      .ap_mode, .gain(sel_gain), .amp_lim, .ph_shift,
      .amp_pi(u_a), .ph_pi(u_p),
      .out_valid(sv), .amp_out(s_amp), .ph_out(s_ph), .limited(sel_limited));

    logic rv;
    logic signed [IQ_W-1:0] r_i, r_q;
    cordic_rot #(.W(IQ_W), .PH_W(PH_W)) u_rot (
      .clk, .rst_n, .in_valid(sv), .amp(s_amp), .phase(s_ph),
      .out_valid(rv), .i_out(r_i), .q_out(r_q));

    always_ff @(posedge clk) begin
      if (!rst_n || !en) begin
        drv_i <= '0; drv_q <= '0;
      end else if (sel_mode) begin
        if (rv) begin drv_i <= r_i; drv_q <= r_q; end
      end else if (pv_i) begin
        drv_i <= IQ_W'(ur_i); drv_q <= IQ_W'(ur_q);
      end
    end
  end else begin : g_nosel
    assign sel_limited = 1'b0;
    always_ff @(posedge clk) begin
      if (!rst_n || !en) begin
        drv_i <= '0; drv_q <= '0;
      end else if (pv_i) begin
        drv_i <= IQ_W'(ur_i); drv_q <= IQ_W'(ur_q);
      end
    end
  end

  assign pi_sat = sat_i || sat_q;

  iq_mod #(.IQ_W(IQ_W), .LO_W(LO_W), .OUT_W(Y_W)) u_mod (
    .clk, .rst_n, .i_in(drv_i), .q_in(drv_q), .lo_cos, .lo_sin, .y);
endmodule
