// tb_fir_ref_pkg: reference data for the FIR testbenches.
//
// Holds the first half of each filter's designed impulse response as real
// numbers, as the window design produced them, and rebuilds the integer
// coefficient of any tap from them independently of the RTL tables: a real
// coefficient m x 10^e with 1 <= |m| < 10 is coded as trunc(m * 1000), and
// tap i of a TAPS-tap symmetric filter uses half entry min(i, TAPS-1-i).
package tb_fir_ref_pkg;

  localparam real LPF_REAL [27] = '{
    -9.1399895e-04, 2.1673690e-04, 1.3270280e-03, 3.2138355e-04,
    -1.9238177e-03, -1.4683633e-03, 2.3627318e-03, 3.4846558e-03,
    -1.9925839e-03, -6.2837282e-03, 4.5320247e-09, 9.2669460e-03,
    4.3430586e-03, -1.1271299e-02, -1.1402453e-02, 1.0630714e-02,
    2.0964392e-02, -5.2583216e-03, -3.2156086e-02, -7.5449714e-03,
    4.3546153e-02, 3.2593190e-02, -5.3413653e-02, -8.5682029e-02,
    6.0122145e-02, 3.1118568e-01, 4.3750000e-01
  };

  localparam real BPF_REAL [37] = '{
    -1.0627330e-04, -3.9118142e-04, -7.5561629e-05, -1.3695577e-04,
    -6.8122013e-04, 5.0929290e-04, 2.3413494e-03, 8.0280013e-04,
    -1.7031635e-04, -5.5034956e-04, -4.9912488e-04, -4.4036355e-03,
    -2.1639856e-03, 6.9094151e-03, 6.6067599e-03, -1.6445200e-03,
    4.5229777e-09, 2.1890066e-03, -1.1720511e-02, -1.6377726e-02,
    6.8804519e-03, 1.8882837e-02, 2.9068601e-03, 4.3925286e-03,
    1.8839744e-02, -1.2481155e-02, -5.2063428e-02, -1.6557375e-02,
    3.3298453e-02, 1.0439025e-02, 9.4320244e-03, 8.5673629e-02,
    4.5314758e-02, -1.6657147e-01, -2.0669512e-01, 8.9135544e-02,
    3.0000000e-01
  };

  localparam real HPF_REAL [27] = '{
    6.6389895e-04, 1.1213670e-04, 1.1720280e-03, 7.5868355e-04,
    2.9838177e-03, -1.4233633e-03, -1.5017318e-03, -9.8166558e-03,
    -6.1825839e-03, 1.1077282e-03, 1.9120247e-09, 2.0509460e-03,
    1.3640586e-03, 8.4521299e-02, -1.6082453e-02, -2.8550714e-02,
    -3.1614392e-02, -2.1873216e-03, -1.0606086e-02, 2.8679714e-03,
    5.4896153e-02, 6.7153190e-02, 5.3403653e-02, 3.1162029e-02,
    -1.2472145e-02, -6.0548568e-01, -5.3750000e-01
  };

  function automatic int code(real r);
    real a, m;
    int  e;
    if (r == 0.0) return 0;
    a = (r < 0.0) ? -r : r;
    e = int'($floor($log10(a)));
    m = a / (10.0 ** e);
    if (m >= 10.0) m = m / 10.0;
    if (m < 1.0)   m = m * 10.0;
    code = int'($floor(m * 1000.0 + 1.0e-6));
    if (r < 0.0) code = -code;
  endfunction

  // Integer coefficient of tap i; kind 0 = lowpass, 1 = bandpass, 2 = highpass.
  function automatic int coef(int kind, int i);
    int taps, j;
    taps = (kind == 1) ? 73 : 54;
    j = (i < taps - 1 - i) ? i : taps - 1 - i;
    case (kind)
      0:       coef = code(LPF_REAL[j]);
      1:       coef = code(BPF_REAL[j]);
      default: coef = code(HPF_REAL[j]);
    endcase
  endfunction

  function automatic int taps_of(int kind);
    return (kind == 1) ? 73 : 54;
  endfunction

endpackage
