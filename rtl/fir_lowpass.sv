// fir_lowpass: the 54-tap lowpass filter (Hamming window; passband edge 1.5 kHz,
// transition width 0.5 kHz, stopband attenuation over 50 dB, sampling at
// 8 kHz; order 53).
//
// A fir_direct_form instance with this filter's tap count and its stored
// half of the symmetric coefficient table from fir_pkg (LPF_HALF). Inputs
// and outputs are the filter's own: clk, clk_enable, reset (synchronous,
// active high), 8-bit signed filter_in, 32-bit signed filter_out. Latency:
// h(0) x(n) appears on filter_out one enabled clock after x(n) is sampled;
// one output per enabled clock. Specification, tap count and coefficients
// follow the filter design; the coefficient integer coding is described in
// fir_pkg.
module fir_lowpass
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    clk_enable,
  input  logic    reset,
  input  sample_t filter_in,
  output acc_t    filter_out
);

  fir_direct_form #(.TAPS(LPF_TAPS), .HALF(LPF_HALF)) u_fir (
    .clk        (clk),
    .clk_enable (clk_enable),
    .reset      (reset),
    .filter_in  (filter_in),
    .filter_out (filter_out)
  );

endmodule
