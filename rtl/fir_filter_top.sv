// fir_filter_top: the three fixed-coefficient direct-form FIR filters -- a
// 54-tap lowpass, a 73-tap bandpass and a 54-tap highpass -- side by side.
//
// The filters are independent designs that share only the clock and the
// synchronous active-high reset; each has its own clock enable, 8-bit signed
// sample input and 32-bit signed output, with the port names of a single
// filter prefixed lpf_, bpf_ and hpf_. Each filter samples its input on an
// enabled clock edge and presents h(0) x(n) + ... one enabled clock later.
// Placing the three in one top (instead of one device per filter) is this
// design's choice.
module fir_filter_top
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    lpf_clk_enable,
  input  sample_t lpf_filter_in,
  output acc_t    lpf_filter_out,
  input  logic    bpf_clk_enable,
  input  sample_t bpf_filter_in,
  output acc_t    bpf_filter_out,
  input  logic    hpf_clk_enable,
  input  sample_t hpf_filter_in,
  output acc_t    hpf_filter_out
);

  fir_lowpass u_lpf (
    .clk (clk), .clk_enable (lpf_clk_enable), .reset (reset),
    .filter_in (lpf_filter_in), .filter_out (lpf_filter_out)
  );

  fir_bandpass u_bpf (
    .clk (clk), .clk_enable (bpf_clk_enable), .reset (reset),
    .filter_in (bpf_filter_in), .filter_out (bpf_filter_out)
  );

  fir_highpass u_hpf (
    .clk (clk), .clk_enable (hpf_clk_enable), .reset (reset),
    .filter_in (hpf_filter_in), .filter_out (hpf_filter_out)
  );

endmodule
