// fir_direct_form: direct-form (tapped delay line) FIR filter,
//   y(n) = sum_{i=0}^{TAPS-1} h(i) x(n-i),
// with one multiplier per tap and a chain of adders, as in the canonical
// direct-form structure: an order-N filter (TAPS = N+1) uses N delay
// registers, N+1 multipliers and N adders.
//
// Datapath, per enabled clock:
//   filter_in -> input register x(n) -> delay_ram holding x(n-1)..x(n-N);
//   tap i: nibble_multiplier h(i) * x(n-i), sign-extended to OUT_W bits;
//   byte_adder chain: s(0) = p(0), s(i) = s(i-1) + p(i);
//   output register filter_out <= s(N).
// Both ends are registered, so no combinational path runs from filter_in to
// filter_out; the whole multiply-add tree lies between the two register
// ranks and sets the clock period.
//
// The impulse response is symmetric (linear phase), so only the first
// (TAPS+1)/2 coefficients are given in HALF; tap i uses
// HALF[min(i, TAPS-1-i)]. Coefficients are fixed at elaboration.
//
// Interface: clk; synchronous active-high reset clearing the delay line and
// the output; clk_enable gating every register (samples move and the output
// updates only on enabled clocks); filter_in (signed DATA_W); filter_out
// (signed OUT_W). Timing: a sample on filter_in at enabled clock edge k
// contributes h(0) x to filter_out after edge k+1, and h(i) x after edge
// k+1+i; one new output per enabled clock.
//
// Following the design: structure, operator counts, 8-bit input, 32-bit
// output, port names. This design's own choices: synchronous reset to zero,
// the linear adder chain order, two's complement throughout, and overflow
// handled by width (checked by an assertion) rather than by correction.
module fir_direct_form
  import fir_pkg::*;
#(
  parameter int    TAPS = LPF_TAPS,
  parameter coef_t HALF [(TAPS+1)/2] = LPF_HALF
) (
  input  logic    clk,
  input  logic    clk_enable,
  input  logic    reset,
  input  sample_t filter_in,
  output acc_t    filter_out
);

  localparam int P_W = DATA_W + COEF_W;

  sample_t                x_n;             // x(n), input register
  sample_t                x_dly [TAPS-1];  // x(n-1) .. x(n-TAPS+1)
  sample_t                x_tap [TAPS];
  logic signed [P_W-1:0]  prod  [TAPS];
  acc_t                   prod_ext [TAPS];
  acc_t                   sum   [TAPS];
  logic [TAPS-1:0]        ovf;

  // Input register.
  always_ff @(posedge clk) begin
    if (reset)           x_n <= '0;
    else if (clk_enable) x_n <= filter_in;
  end

  delay_ram #(.W(DATA_W), .DEPTH(TAPS-1)) u_delay (
    .clk   (clk),
    .reset (reset),
    .en    (clk_enable),
    .d     (x_n),
    .q     (x_dly)
  );

  assign x_tap[0] = x_n;
  for (genvar i = 1; i < TAPS; i++) begin : g_tap
    assign x_tap[i] = x_dly[i-1];
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_mul
    nibble_multiplier #(.A_W(DATA_W), .B_W(COEF_W)) u_mul (
      .a (x_tap[i]),
      .b (HALF[half_index(i, TAPS)]),
      .p (prod[i])
    );
    assign prod_ext[i] = OUT_W'(prod[i]);
  end

  assign sum[0] = prod_ext[0];
  assign ovf[0] = 1'b0;
  for (genvar i = 1; i < TAPS; i++) begin : g_add
    byte_adder #(.W(OUT_W)) u_add (
      .a   (sum[i-1]),
      .b   (prod_ext[i]),
      .s   (sum[i]),
      .ovf (ovf[i])
    );
  end

  // Output register.
  always_ff @(posedge clk) begin
    if (reset)           filter_out <= '0;
    else if (clk_enable) filter_out <= sum[TAPS-1];
  end

  // Overflow is avoided by word width, never corrected: no adder may wrap.
  always_ff @(posedge clk) begin
    if (!reset && clk_enable)
      assert (ovf == '0) else $error("fir_direct_form: adder overflow");
  end

endmodule
