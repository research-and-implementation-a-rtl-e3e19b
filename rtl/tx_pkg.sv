// Shared types and constants of the HF (short-wave) DSB/SSB transmitter.
//
// The numbers that follow the published design: a 50 MHz system clock,
// a 512-entry sine table with 12-bit samples addressed by a 9-bit step
// counter (f = 50e6 * step / 512), 16-bit audio samples, a 12x16 multiplier
// with a 12-bit result, a 12-bit DAC and a 60-tap harmonic FIR filter.
// Everything else here is a choice of this implementation: the coefficient
// format (signed Q1.15), the coefficient values, the mode encoding and the
// register map.
//
// Both coefficient sets are Hamming-windowed sinc low-pass filters,
//   h[i] = w[i] * sin(2*pi*fc*(i-m)) / (pi*(i-m)),  m = (N-1)/2,
//   w[i] = 0.54 - 0.46*cos(2*pi*i/(N-1)),
// normalised to unity DC gain and rounded to integers scaled by 2^15.
//   HF_LPF_COEFS     : fc = 22 MHz / 50 MHz  (harmonic filter before the DAC)
//   WEAVER_LPF_COEFS : fc = 1.5 kHz / 48 kHz (the two Weaver SSB branch filters)
package tx_pkg;

  localparam int unsigned CLK_HZ      = 50_000_000;
  localparam int unsigned PHASE_W     = 9;      // 9-bit counter
  localparam int unsigned TABLE_DEPTH = 512;    // samples per sine cycle
  localparam int unsigned SINE_W      = 12;     // bits per sine sample
  localparam int unsigned AUDIO_W     = 16;     // audio sample width
  localparam int unsigned DAC_W       = 12;     // DAC902 input width
  localparam int unsigned FIR_TAPS    = 60;     // harmonic filter length
  localparam int unsigned COEF_W      = 16;
  localparam int unsigned COEF_FRAC   = 15;

  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [SINE_W-1:0]  sine_t;
  typedef logic signed [AUDIO_W-1:0] audio_t;
  typedef logic signed [DAC_W-1:0]   hf_t;
  typedef logic [PHASE_W-1:0]        phase_t;

  // Modulation mode selected from the host.
  typedef enum logic {
    MODE_DSB = 1'b0,   // double sideband, suppressed carrier
    MODE_SSB = 1'b1    // single sideband (Weaver method)
  } mod_mode_e;

  // Default carrier step: 185 -> 50e6*185/512 = 18 066 406 Hz.
  localparam phase_t DEFAULT_STEP    = 9'd185;
  // Default Weaver audio-LO step at 48 kHz audio rate: 48000*18/512 = 1687.5 Hz.
  localparam phase_t DEFAULT_LO_STEP = 9'd18;

  localparam coef_t HF_LPF_COEFS [FIR_TAPS] = '{
    -4, -8, 20, -34, 49, -60, 64, -55, 29, 18,
    -82, 157, -231, 287, -307, 272, -171, 0, 232, -504,
    779, -1009, 1139, -1106, 844, -276, -718, 2413, -5838, 20483,
    20483, -5838, 2413, -718, -276, 844, -1106, 1139, -1009, 779,
    -504, 232, 0, -171, 272, -307, 287, -231, 157, -82,
    18, 29, -55, 64, -60, 49, -34, 20, -8, -4
  };

  localparam coef_t WEAVER_LPF_COEFS [FIR_TAPS] = '{
    -13, -19, -26, -36, -47, -61, -75, -89, -101, -108,
    -107, -96, -70, -28, 33, 115, 218, 343, 487, 648,
    822, 1004, 1189, 1370, 1541, 1695, 1827, 1930, 2002, 2039,
    2039, 2002, 1930, 1827, 1695, 1541, 1370, 1189, 1004, 822,
    648, 487, 343, 218, 115, 33, -28, -70, -96, -107,
    -108, -101, -89, -75, -61, -47, -36, -26, -19, -13
  };

endpackage
