// fir_pkg: word widths, sample/coefficient/accumulator types and the three
// coefficient tables of the direct-form FIR filters (lowpass, bandpass,
// highpass).
//
// Data are 8-bit two's complement samples (a sign bit followed by the
// magnitude bits, binary point after the sign, i.e. proper fractions); the
// filter output is a 32-bit two's complement sum. Coefficients are signed
// integers of at most 15 bits.
//
// Every filter is linear phase, so its impulse response is symmetric and only
// the first half of each table is stored: tap i uses entry min(i, TAPS-1-i).
//   - Lowpass  (Hamming window, fp = 1.5 kHz, transition 0.5 kHz, fs = 8 kHz):
//     54 taps, the 27 entries below mirrored, the centre entry used twice.
//   - Bandpass (Kaiser window, 150-250 Hz, transition 50 Hz, fs = 1 kHz):
//     73 taps, the 37 entries below mirrored around entry 36.
//   - Highpass (Hamming window, fs = 8 kHz): 54 taps like the lowpass.
// Each integer is the designed real coefficient written in scientific
// notation m x 10^e, 1 <= |m| < 10, with the exponent dropped and the
// mantissa truncated to four digits: trunc(m * 1000). For example
// -9.1399895e-04 becomes -9139 and 4.3750000e-01 becomes 4375. This is the
// integer coding that reproduces the reference simulation outputs the filters
// were designed against; it is kept as given, although it does not scale all
// coefficients by one common factor, so the realised frequency response
// differs from the windowed design.
package fir_pkg;

  localparam int DATA_W = 8;   // filter_in width
  localparam int COEF_W = 15;  // widest coefficient (|c| <= 9816)
  localparam int OUT_W  = 32;  // filter_out and adder width

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [OUT_W-1:0]  acc_t;

  // Number of taps (filter order + 1) and stored half-table sizes.
  localparam int LPF_TAPS = 54;
  localparam int BPF_TAPS = 73;
  localparam int HPF_TAPS = 54;

  localparam int LPF_HALF_N = (LPF_TAPS + 1) / 2;  // 27
  localparam int BPF_HALF_N = (BPF_TAPS + 1) / 2;  // 37
  localparam int HPF_HALF_N = (HPF_TAPS + 1) / 2;  // 27

  localparam coef_t LPF_HALF [LPF_HALF_N] = '{
    -15'sd9139,  15'sd2167,  15'sd1327,  15'sd3213, -15'sd1923, -15'sd1468,
     15'sd2362,  15'sd3484, -15'sd1992, -15'sd6283,  15'sd4532,  15'sd9266,
     15'sd4343, -15'sd1127, -15'sd1140,  15'sd1063,  15'sd2096, -15'sd5258,
    -15'sd3215, -15'sd7544,  15'sd4354,  15'sd3259, -15'sd5341, -15'sd8568,
     15'sd6012,  15'sd3111,  15'sd4375
  };

  localparam coef_t BPF_HALF [BPF_HALF_N] = '{
    -15'sd1062, -15'sd3911, -15'sd7556, -15'sd1369, -15'sd6812,  15'sd5092,
     15'sd2341,  15'sd8028, -15'sd1703, -15'sd5503, -15'sd4991, -15'sd4403,
    -15'sd2163,  15'sd6909,  15'sd6606, -15'sd1644,  15'sd4522,  15'sd2189,
    -15'sd1172, -15'sd1637,  15'sd6880,  15'sd1888,  15'sd2906,  15'sd4392,
     15'sd1883, -15'sd1248, -15'sd5206, -15'sd1655,  15'sd3329,  15'sd1043,
     15'sd9432,  15'sd8567,  15'sd4531, -15'sd1665, -15'sd2066,  15'sd8913,
     15'sd3000
  };

  localparam coef_t HPF_HALF [HPF_HALF_N] = '{
     15'sd6638,  15'sd1121,  15'sd1172,  15'sd7586,  15'sd2983, -15'sd1423,
    -15'sd1501, -15'sd9816, -15'sd6182,  15'sd1107,  15'sd1912,  15'sd2050,
     15'sd1364,  15'sd8452, -15'sd1608, -15'sd2855, -15'sd3161, -15'sd2187,
    -15'sd1060,  15'sd2867,  15'sd5489,  15'sd6715,  15'sd5340,  15'sd3116,
    -15'sd1247, -15'sd6054, -15'sd5375
  };

  // Index into a stored half table for tap i of a symmetric filter.
  function automatic int half_index(int i, int taps);
    return (i < taps - 1 - i) ? i : taps - 1 - i;
  endfunction

endpackage
