// irf_pkg: constants shared by the image rejection datapath.
//
// Holds the word widths, the 8-entry sine/cosine tables of the 1-MHz frequency
// shifter and the coefficients of the decimation low-pass filter.  The rates
// (8 MHz system rate, 1-MHz and 500-kHz shifts, decimation by 4) follow the
// published architecture; every width and the filter itself are this design's
// own choices, since the architecture fixes only the filter's job.
//
// Low-pass filter: 64-tap linear-phase FIR, Kaiser-windowed sinc,
//   h[n] = w_kaiser(n, beta = 6) * sinc(2*fc/Fs*(n - 31.5)),  fc = 500 kHz, Fs = 8 MHz,
//   normalised to sum(h) = 1, stored as round(2^15 * h[n]) (DC gain 32770/32768).
// Response: flat (-0.1 dB) to 300 kHz, -6 dB at 500 kHz, below -60 dB from
// 750 kHz to 4 MHz, so the image, which lands near -2 MHz after the 1-MHz shift,
// and the out-of-band quantization noise are removed before decimation by 4.
//
// Shifter tables: SIN_LUT[k] = round(127*sin(2*pi*k/8)), COS_LUT[k] = round(127*cos(2*pi*k/8)).
package irf_pkg;

  localparam int FS_HZ      = 8_000_000;  // system sampling rate
  localparam int DECIM      = 4;          // 8 MHz -> 2 MHz
  localparam int ADC_W      = 12;         // sampled analog input word
  localparam int LUT_W      = 8;          // sine / cosine table word
  localparam int SH_W       = LUT_W + 1;  // 1-MHz shifter output (sum of two table words)
  localparam int NTAPS      = 64;         // LPF length
  localparam int COEF_W     = 16;         // LPF coefficient word
  localparam int COEF_FRAC  = 15;         // coefficient fraction bits
  localparam int FRAC_KEEP  = 4;          // LPF output keeps 4 bits below the input LSB
  localparam int LPF_W      = 16;         // LPF / decimator / output word

  typedef logic signed [LUT_W-1:0]  lut_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  localparam lut_t SIN_LUT [8] = '{8'sd0, 8'sd90, 8'sd127, 8'sd90, 8'sd0, -8'sd90, -8'sd127, -8'sd90};
  localparam lut_t COS_LUT [8] = '{8'sd127, 8'sd90, 8'sd0, -8'sd90, -8'sd127, -8'sd90, 8'sd0, 8'sd90};

  localparam coef_t LPF_COEF [NTAPS] = '{
        -1,     -5,    -11,    -18,    -25,    -29,    -25,    -11,
        14,     51,     95,    136,    164,    167,    133,     55,
       -65,   -217,   -380,   -523,   -610,   -604,   -473,   -195,
       232,    792,   1450,   2149,   2825,   3409,   3839,   4066,
      4066,   3839,   3409,   2825,   2149,   1450,    792,    232,
      -195,   -473,   -604,   -610,   -523,   -380,   -217,    -65,
        55,    133,    167,    164,    136,     95,     51,     14,
       -11,    -25,    -29,    -25,    -18,    -11,     -5,     -1
  };

endpackage
