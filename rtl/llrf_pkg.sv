// llrf_pkg: shared widths, mode encoding, register-map types and the CORDIC
// arctangent table of the universal LLRF controller.
//
// Word widths are this design's choice (the controller's reference gives none):
// 14-bit ADC and DAC codes, 16-bit local-oscillator samples, 18-bit baseband
// I/Q words, 16-bit phase (2^16 = 360 degrees) and a 32-bit phase increment
// word at the 125 MHz system clock.
package llrf_pkg;

  localparam int ADC_W = 14;
  localparam int DAC_W = 14;
  localparam int LO_W  = 16;
  localparam int IQ_W  = 18;
  localparam int AMP_W = IQ_W + 1;
  localparam int PH_W  = 16;
  localparam int PIW_W = 32;
  localparam int G_W   = 16;
  localparam int Y_W   = 16;   // one chain's modulated output

  // Operating modes selected from software.
  typedef enum logic [1:0] {
    MODE_SAW    = 2'd0,  // sawtooth generator: three harmonic chains
    MODE_GDR    = 2'd1,  // generator-driven resonator, IQ feedback
    MODE_SEL    = 2'd2,  // free-running self-excited loop
    MODE_SEL_AP = 2'd3   // self-excited loop with amplitude and phase lock
  } mode_e;

  typedef struct packed {
    logic [G_W-1:0] ki;
    logic [G_W-1:0] kp;
  } gains_t;

  typedef struct packed {
    logic signed [IQ_W-1:0] i_sp;
    logic signed [IQ_W-1:0] q_sp;
    gains_t                 g;
    logic signed [LO_W-1:0] rot_cos;  // loop-phase rotation of the IQ drive,
    logic signed [LO_W-1:0] rot_sin;  // cos and sin of the angle in 2^-15
  } chain_cfg_t;

  // Everything software writes.
  typedef struct packed {
    mode_e                   mode;
    logic                    pi_clear;
    logic                    dpll_en;
    logic                    tuner_en;
    logic [PIW_W-1:0]        piw_base;
    chain_cfg_t [2:0]        ch;
    gains_t                  g_amp;      // SEL-AP amplitude loop
    gains_t                  g_ph;       // SEL-AP phase loop
    gains_t                  g_dpll;
    logic [IQ_W-1:0]         amp_sp;     // SEL-AP amplitude set point
    logic [PH_W-1:0]         ph_sp;      // SEL-AP phase set point
    logic [PH_W-1:0]         ph_shift;   // SEL phase shifter
    logic [IQ_W-1:0]         amp_lim;    // SEL amplitude limiter
    logic [G_W-1:0]          sel_gain;   // SEL loop gain, 2^-8 units
    logic [DAC_W-1:0]        dac_lim;    // output limiter
    logic [PH_W-1:0]         tuner_thr;
    logic [PH_W-1:0]         tuner_off;
    logic [7:0]              tuner_duty;
  } llrf_cfg_t;

  // Everything software reads back.
  typedef struct packed {
    logic [AMP_W-1:0]        amp0;
    logic [PH_W-1:0]         ph0;
    logic signed [IQ_W-1:0]  i0;
    logic signed [IQ_W-1:0]  q0;
    logic [PIW_W-1:0]        piw;
    logic [PH_W-1:0]         dpll_err;
    logic [PH_W-1:0]         tuner_err;
    logic                    clip;
    logic                    tuner_cw;
    logic                    tuner_ccw;
  } llrf_sts_t;

  // atan(2^-i) as a fraction of a full turn, 32-bit; shifted down to PH_W.
  function automatic logic [31:0] atan_turn(input int i);
    case (i)
      0: return 32'd536870912;   1: return 32'd316933406;
      2: return 32'd167458907;   3: return 32'd85004756;
      4: return 32'd42667331;    5: return 32'd21354465;
      6: return 32'd10679838;    7: return 32'd5340245;
      8: return 32'd2670163;     9: return 32'd1335087;
      10: return 32'd667544;     11: return 32'd333772;
      12: return 32'd166886;     13: return 32'd83443;
      14: return 32'd41722;      15: return 32'd20861;
      16: return 32'd10430;      17: return 32'd5215;
      18: return 32'd2608;       19: return 32'd1304;
      default: return 32'd0;
    endcase
  endfunction

  // 1/CORDIC gain (product of 1/sqrt(1+2^-2i)) in units of 2^-16.
  localparam int CORDIC_INV_GAIN = 39797;

endpackage
