// axil_regs: AXI4-Lite control and status registers of the LLRF controller.
//
// Every control parameter the software sets - mode, set points, PI gains,
// phase shift, limits, the phase increment word, tuner settings - sits in a
// 32-bit register, and measurements are read back the same way. A write is
// taken when AWVALID and WVALID are both high and no response is pending
// (AWREADY = WREADY for one clock), answered by BVALID/OKAY one clock
// later; byte strobes are honoured. A read is taken when ARVALID is high
// and no read data is pending, answered by RVALID one clock later. Unmapped
// addresses read as zero and ignore writes (OKAY). Register map (byte
// address): 0x00 CTRL {tuner_en[4], dpll_en[3], pi_clear[2], mode[1:0]};
// 0x04 PIW_BASE; per chain c = 0..2 at 0x08+12c: I_SP, Q_SP,
// GAIN {ki[31:16], kp[15:0]}; 0x2C G_AMP; 0x30 G_PH; 0x34 G_DPLL;
// 0x38 AMP_SP; 0x3C PH_SP; 0x40 PH_SHIFT; 0x44 AMP_LIM; 0x48 SEL_GAIN;
// 0x4C DAC_LIM; 0x50 TUNER_THR; 0x54 TUNER_OFF; 0x58 TUNER_DUTY;
// 0x5C+4c ROTc {sin[31:16], cos[15:0]} (loop-phase rotation of chain c,
// 2^-15 units, reset cos = 32767, sin = 0); read-only
// 0x80 AMP0, 0x84 PH0, 0x88 I0, 0x8C Q0, 0x90 PIW, 0x94 DPLL_ERR,
// 0x98 TUNER_ERR, 0x9C STATUS {ccw[2], cw[1], clip[0]}.
// Memory-mapped AXI control of all parameters follows the controller; the
// single register slave (in place of separate GPIO cores) and the map are
// this design's.
module axil_regs
  import llrf_pkg::*;
#(
  parameter int ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output llrf_cfg_t         cfg,
  input  llrf_sts_t         sts
);
  localparam int NREG = 26;
  logic [31:0] r [NREG];

  function automatic logic [31:0] reset_value(input int k);
    case (k)
      1:  return 32'd416611827;   // 12.125 MHz at 125 MHz: 0.097 * 2^32
      4, 7, 10, 11, 12, 13: return {16'd16, 16'd256};  // ki, kp
      17: return 32'd65536;       // AMP_LIM
      18: return 32'd256;         // SEL_GAIN = 1.0
      19: return 32'd8191;        // DAC_LIM = full scale
      20: return 32'd1024;        // TUNER_THR ~ 5.6 deg
      22: return 32'd128;         // TUNER_DUTY = 50 %
      23, 24, 25: return 32'd32767;  // ROTc: cos = 1, sin = 0
      default: return 32'd0;
    endcase
  endfunction

  // write channel
  logic do_wr;
  logic [ADDR_W-3:0] widx;
  assign do_wr = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign widx  = s_axi_awaddr[ADDR_W-1:2];
  assign s_axi_awready = do_wr;
  assign s_axi_wready  = do_wr;
  assign s_axi_bresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NREG; k++) r[k] <= reset_value(k);
      s_axi_bvalid <= 1'b0;
    end else begin
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (do_wr) begin
        s_axi_bvalid <= 1'b1;
        for (int k = 0; k < NREG; k++)
          if (int'(widx) == k)
            for (int b = 0; b < 4; b++)
              if (s_axi_wstrb[b]) r[k][8*b +: 8] <= s_axi_wdata[8*b +: 8];
      end
    end
  end

  // read channel
  logic [ADDR_W-3:0] ridx;
  logic [31:0] rd;
  assign ridx = s_axi_araddr[ADDR_W-1:2];
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_rresp   = 2'b00;

  always_comb begin
    rd = '0;
    if (int'(ridx) < NREG) begin
      for (int k = 0; k < NREG; k++) if (int'(ridx) == k) rd = r[k];
    end else begin
      case (int'(ridx))
        32: rd = 32'(sts.amp0);
        33: rd = 32'(sts.ph0);
        34: rd = 32'(sts.i0);
        35: rd = 32'(sts.q0);
        36: rd = sts.piw;
        37: rd = 32'(sts.dpll_err);
        38: rd = 32'(sts.tuner_err);
        39: rd = {29'd0, sts.tuner_ccw, sts.tuner_cw, sts.clip};
        default: rd = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= rd;
      end
    end
  end

  // register fields
  always_comb begin
    cfg.mode       = mode_e'(r[0][1:0]);
    cfg.pi_clear   = r[0][2];
    cfg.dpll_en    = r[0][3];
    cfg.tuner_en   = r[0][4];
    cfg.piw_base   = r[1];
    for (int c = 0; c < 3; c++) begin
      cfg.ch[c].i_sp = IQ_W'(r[2+3*c]);
      cfg.ch[c].q_sp = IQ_W'(r[3+3*c]);
      cfg.ch[c].g    = r[4+3*c];
      cfg.ch[c].rot_cos = LO_W'(r[23+c]);
      cfg.ch[c].rot_sin = LO_W'(r[23+c] >> 16);
    end
    cfg.g_amp      = r[11];
    cfg.g_ph       = r[12];
    cfg.g_dpll     = r[13];
    cfg.amp_sp     = IQ_W'(r[14]);
    cfg.ph_sp      = PH_W'(r[15]);
    cfg.ph_shift   = PH_W'(r[16]);
    cfg.amp_lim    = IQ_W'(r[17]);
    cfg.sel_gain   = G_W'(r[18]);
    cfg.dac_lim    = DAC_W'(r[19]);
    cfg.tuner_thr  = PH_W'(r[20]);
    cfg.tuner_off  = PH_W'(r[21]);
    cfg.tuner_duty = 8'(r[22]);
  end
endmodule
