// lsync_pkg: widths, types and constants shared by the laser-synchronisation
// firmware chain (IF digitising, quadrature detection, CORDIC phase
// measurement, IIR filter, PI feedback to the piezo DAC).
// The data widths are the bus widths printed in the firmware block diagram:
// 16-bit ADC samples, 18-bit LO table words, 18-bit I/Q, amplitude and phase,
// 16-bit Kp/Ki gains, 25/33/17-bit PI internals and an 18-bit DAC word.
// Fixed-point scalings (where the binary point sits) are this design's own.
package lsync_pkg;

  localparam int unsigned ADC_W   = 16;  // ADC sample width
  localparam int unsigned LO_W    = 18;  // LO table word width
  localparam int unsigned IQ_W    = 18;  // decimated I/Q width
  localparam int unsigned PH_W    = 18;  // phase / amplitude width
  localparam int unsigned GAIN_W  = 16;  // Kp and Ki width
  localparam int unsigned CTRL_W  = 17;  // PI controller output width
  localparam int unsigned DAC_W   = 18;  // DAC word width
  localparam int unsigned COEF_W  = 18;  // IIR coefficient width (Q2.16)

  localparam int unsigned LUT_LEN = 5;   // LO samples per IF period (fs/fIF)
  localparam int unsigned MA_LEN  = 5;   // moving-average length
  localparam int unsigned DEC     = 100; // decimation factor
  localparam int unsigned CORDIC_ITER = 17;

  typedef logic signed [ADC_W-1:0]  adc_t;
  typedef logic signed [LO_W-1:0]   lo_t;
  typedef logic signed [IQ_W-1:0]   iq_word_t;
  typedef logic signed [PH_W-1:0]   phase_t;   // 2^17 LSB = pi
  typedef logic        [PH_W-1:0]   ampl_t;    // unsigned magnitude
  typedef logic signed [GAIN_W-1:0] gain_t;
  typedef logic signed [CTRL_W-1:0] ctrl_t;
  typedef logic signed [DAC_W-1:0]  dac_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  typedef struct packed {
    iq_word_t i;
    iq_word_t q;
  } iq_t;

  // Biquad coefficients, Q2.16: y = b0 x0 + b1 x1 + b2 x2 - a1 y1 - a2 y2
  typedef struct packed {
    coef_t b0;
    coef_t b1;
    coef_t b2;
    coef_t a1;
    coef_t a2;
  } biquad_coef_t;

  // User registers of the chain (written by the host over the board bus)
  typedef struct packed {
    lo_t          rot_cos;    // cos(a), Q1.17
    lo_t          rot_sin;    // sin(a), Q1.17
    biquad_coef_t iir_coef;
    logic         iir_bypass;
    phase_t       setpoint;
    gain_t        kp;
    gain_t        ki;
    ctrl_t        ff_offset;
  } lsync_cfg_t;

  // Monitor points ("MonPnt" taps) brought out for readout
  typedef struct packed {
    adc_t     adc;
    iq_t      iq_dec;     // after decimation
    iq_t      iq_rot;     // after rotator
    ampl_t    ampl;
    phase_t   phase;
    phase_t   phase_filt; // after IIR / bypass mux
    phase_t   error;      // set-point minus filtered phase
    ctrl_t    pi_int;     // integrator state (top 17 bits)
    ctrl_t    pi_out;
    logic     pi_sat;     // integrator clipped this update
    dac_t     dac;
  } lsync_mon_t;

  // Saturate a wide signed value to W bits
  function automatic logic signed [63:0] sat(input logic signed [63:0] v, input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
