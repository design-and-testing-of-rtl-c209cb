// llrf_top: programmable-logic part of the universal LLRF controller.
//
// One fixed bitstream serves every cavity type; software picks the mode:
//  * Sawtooth generator - the pick-up is broadcast to three chains at fo,
//    2fo and 3fo, each stabilising its harmonic in the IQ domain, and the
//    combiner sums their drives into one waveform.
//  * GDR - chain 0 regulates a single frequency against the reference-locked
//    DDS; the forward signal on the second ADC channel is phase-compared
//    with the pick-up to drive the motorised tuner.
//  * SEL / SEL-AP - chain 0 runs a self-excited loop (phase pass with
//    limiter); in SEL the DPLL pulls the DDS onto the cavity, in SEL-AP onto
//    the external reference while amplitude/phase PI loops lock the field.
// The DPLL trims the common phase increment word of all DDSs. The summed
// drive passes the output limiter to the DAC. All parameters and readbacks
// live in an AXI4-Lite register slave (map in axil_regs).
// Interface: 14-bit ADC samples and DAC code each clock (125 MHz), a GPIO
// reference bit, tuner MOV/CW/CCW, AXI4-Lite slave. Synchronous active-low
// reset. The block set and their connections follow the controller's
// algorithm diagram; the forward-phase path for the tuner (a demodulator,
// DDC and CORDIC on the second ADC channel at fo) is this design's.
module llrf_top
  import llrf_pkg::*;
#(
  parameter int DEC_LOG = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_pu,
  input  logic signed [ADC_W-1:0] adc_ref,
  input  logic                    ext_ref,
  output logic signed [DAC_W-1:0] dac_drive,
  output logic                    tuner_mov,
  output logic                    tuner_cw,
  output logic                    tuner_ccw,
  input  logic [7:0]              s_axi_awaddr,
  input  logic                    s_axi_awvalid,
  output logic                    s_axi_awready,
  input  logic [31:0]             s_axi_wdata,
  input  logic [3:0]              s_axi_wstrb,
  input  logic                    s_axi_wvalid,
  output logic                    s_axi_wready,
  output logic [1:0]              s_axi_bresp,
  output logic                    s_axi_bvalid,
  input  logic                    s_axi_bready,
  input  logic [7:0]              s_axi_araddr,
  input  logic                    s_axi_arvalid,
  output logic                    s_axi_arready,
  output logic [31:0]             s_axi_rdata,
  output logic [1:0]              s_axi_rresp,
  output logic                    s_axi_rvalid,
  input  logic                    s_axi_rready
);
  llrf_cfg_t cfg;
  llrf_sts_t sts;

  axil_regs #(.ADDR_W(8)) u_regs (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .cfg, .sts);

  // mode multiplexer
  logic signed [ADC_W-1:0] chain_x [3];
  logic [2:0]              chain_en;
  logic signed [ADC_W-1:0] fwd_x;
  logic                    tuner_mode, dpll_use_pu;
  mode_mux u_mux (
    .clk, .rst_n, .mode(cfg.mode), .adc_pu, .adc_ref,
    .chain_x, .chain_en, .fwd_x, .tuner_en(tuner_mode), .dpll_use_pu);

  // chain outputs
  logic signed [Y_W-1:0]  y [3];
  logic signed [LO_W-1:0] lo_cos [3];
  logic signed [LO_W-1:0] lo_sin [3];
  logic                   m_valid [3];
  logic [AMP_W-1:0]       m_amp [3];
  logic [PH_W-1:0]        m_ph [3];
  logic signed [IQ_W-1:0] m_i [3];
  logic signed [IQ_W-1:0] m_q [3];

  // DPLL
  logic [PIW_W-1:0] piw;
  dpll #(.HARM(3), .DEC_LOG(DEC_LOG)) u_dpll (
    .clk, .rst_n, .ext_ref, .use_pu(dpll_use_pu),
    .pu_valid(m_valid[0]), .pu_ph(m_ph[0]),
    .en(cfg.dpll_en), .piw_base(cfg.piw_base), .ph_sp('0), .g(cfg.g_dpll),
    .piw, .ph_err(sts.dpll_err), .upd());

  // three feedback chains at fo, 2fo, 3fo

  for (genvar c = 0; c < 3; c++) begin : g_chain
    llrf_chain #(.HARM(c + 1), .HAS_SEL(c == 0), .DEC_LOG(DEC_LOG)) u_chain (
      .clk, .rst_n, .x(chain_x[c]), .en(chain_en[c]), .mode(cfg.mode),
      .clear(cfg.pi_clear), .piw, .ccfg(cfg.ch[c]),
      .g_amp(cfg.g_amp), .g_ph(cfg.g_ph), .amp_sp(cfg.amp_sp),
      .ph_sp(cfg.ph_sp), .ph_shift(cfg.ph_shift), .amp_lim(cfg.amp_lim),
      .sel_gain(cfg.sel_gain),
      .y(y[c]), .lo_cos(lo_cos[c]), .lo_sin(lo_sin[c]),
      .meas_valid(m_valid[c]), .meas_amp(m_amp[c]), .meas_ph(m_ph[c]),
      .meas_i(m_i[c]), .meas_q(m_q[c]), .pi_sat(), .sel_limited());
  end

  // combiner and output limiter
  logic signed [Y_W+2:0] sum;
  combiner #(.N(3), .IN_W(Y_W)) u_comb (
    .clk, .rst_n, .en(chain_en), .y_in(y), .sum);
  limiter #(.IN_W(Y_W+3), .DAC_W(DAC_W)) u_lim (
    .clk, .rst_n, .x(sum), .lim(cfg.dac_lim), .y(dac_drive), .clip(sts.clip));

  // forward-signal phase at fo for the tuner
  logic signed [ADC_W+LO_W-1:0] f_pi, f_pq;
  iq_demod #(.ADC_W(ADC_W), .LO_W(LO_W)) u_fwd_demod (
    .clk, .rst_n, .x(fwd_x), .lo_cos(lo_cos[0]), .lo_sin(lo_sin[0]),
    .p_i(f_pi), .p_q(f_pq));
  logic fdv;
  logic signed [IQ_W-1:0] f_i, f_q;
  ddc #(.IN_W(ADC_W+LO_W), .OUT_W(IQ_W), .DEC_LOG(DEC_LOG)) u_fwd_ddc (
    .clk, .rst_n, .in_valid(1'b1), .p_i(f_pi), .p_q(f_pq),
    .out_valid(fdv), .i_out(f_i), .q_out(f_q));
  logic fv;
  logic [PH_W-1:0] f_ph;
  cordic_vec #(.W(IQ_W), .PH_W(PH_W)) u_fwd_vec (
    .clk, .rst_n, .in_valid(fdv), .i_in(f_i), .q_in(f_q),
    .out_valid(fv), .amp(), .phase(f_ph));

  tuner_ctrl #(.PH_W(PH_W), .PWM_W(8)) u_tuner (
    .clk, .rst_n, .en(cfg.tuner_en && tuner_mode), .ph_valid(fv),
    .fwd_ph(f_ph), .pu_ph(m_ph[0]), .ph_offset(cfg.tuner_off),
    .thr(cfg.tuner_thr), .duty(cfg.tuner_duty),
    .mov(tuner_mov), .cw(tuner_cw), .ccw(tuner_ccw), .err(sts.tuner_err));

  assign sts.amp0      = m_amp[0];
  assign sts.ph0       = m_ph[0];
  assign sts.i0        = m_i[0];
  assign sts.q0        = m_q[0];
  assign sts.piw       = piw;
  assign sts.tuner_cw  = tuner_cw;
  assign sts.tuner_ccw = tuner_ccw;
endmodule
