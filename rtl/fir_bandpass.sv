// fir_bandpass: the 73-tap bandpass filter (Kaiser window; passband 150-250 Hz,
// transition width 50 Hz, 0.1 dB passband ripple, 60 dB stopband
// attenuation, sampling at 1 kHz; order 72).
//
// A fir_direct_form instance with this filter's tap count and its stored
// half of the symmetric coefficient table from fir_pkg (BPF_HALF). Inputs
// and outputs are the filter's own: clk, clk_enable, reset (synchronous,
// active high), 8-bit signed filter_in, 32-bit signed filter_out. Latency:
// h(0) x(n) appears on filter_out one enabled clock after x(n) is sampled;
// one output per enabled clock. Specification, tap count and coefficients
// follow the filter design; the coefficient integer coding is described in
// fir_pkg.
module fir_bandpass
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    clk_enable,
  input  logic    reset,
  input  sample_t filter_in,
  output acc_t    filter_out
);

  fir_direct_form #(.TAPS(BPF_TAPS), .HALF(BPF_HALF)) u_fir (
    .clk        (clk),
    .clk_enable (clk_enable),
    .reset      (reset),
    .filter_in  (filter_in),
    .filter_out (filter_out)
  );

endmodule
