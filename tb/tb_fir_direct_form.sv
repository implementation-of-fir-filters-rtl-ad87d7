// tb_fir_direct_form: self-checking testbench of the generic direct-form
// filter, using small filters with hand-chosen coefficients so that every
// tap and the coefficient mirroring can be seen.
//
// Two instances run side by side: 5 taps (odd length, half table of 3,
// tap i uses entry min(i, 4-i)) and 6 taps (even length, centre entry used
// twice). An impulse shows the impulse response h(0..TAPS-1) appearing one
// enabled clock after the impulse is sampled; then random samples, random
// clock enable and occasional resets are compared every clock with a
// convolution computed by the testbench from its own coefficient lists.
module tb_fir_direct_form;
  import fir_pkg::*;

  localparam int T5 = 5;
  localparam int T6 = 6;
  localparam coef_t H5 [3] = '{15'sd3, -15'sd7, 15'sd11};
  localparam coef_t H6 [3] = '{-15'sd16384, 15'sd5, 15'sd16383};
  localparam int    R5 [T5] = '{3, -7, 11, -7, 3};
  localparam int    R6 [T6] = '{-16384, 5, 16383, 16383, 5, -16384};

  logic    clk = 1'b0;
  logic    clk_enable, reset;
  sample_t filter_in;
  acc_t    out5, out6;
  int checks = 0;
  int failures = 0;
  int stalls = 0;

  fir_direct_form #(.TAPS(T5), .HALF(H5)) dut5 (
    .clk, .clk_enable, .reset, .filter_in, .filter_out(out5));
  fir_direct_form #(.TAPS(T6), .HALF(H6)) dut6 (
    .clk, .clk_enable, .reset, .filter_in, .filter_out(out6));

  always #5 clk = ~clk;

  int     hist [T6];
  longint exp5, exp6;

  always @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < T6; i++) hist[i] = 0;
      exp5 = 0;
      exp6 = 0;
    end else if (clk_enable) begin
      exp5 = 0;
      exp6 = 0;
      for (int i = 0; i < T5; i++) exp5 += longint'(R5[i]) * hist[i];
      for (int i = 0; i < T6; i++) exp6 += longint'(R6[i]) * hist[i];
      for (int i = T6 - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(filter_in);
    end
  end

  // Called on a falling edge; checks on the next falling edge.
  task automatic step(logic en, logic rst, int x);
    clk_enable = en;
    reset      = rst;
    filter_in  = sample_t'(x);
    if (!en && !rst) stalls++;
    @(negedge clk);
    checks += 2;
    if (out5 !== acc_t'(exp5) || out6 !== acc_t'(exp6)) begin
      failures++;
      $display("FAIL out5=%0d exp %0d, out6=%0d exp %0d", out5, exp5, out6, exp6);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_enable = 1'b0;
    reset      = 1'b1;
    filter_in  = '0;
    for (int i = 0; i < T6; i++) hist[i] = 0;
    exp5 = 0;
    exp6 = 0;
    @(negedge clk);
    @(negedge clk);
    // Impulse: sampled at the first enabled edge, h(k) on the output after
    // the (k+2)-th enabled edge.
    step(1'b1, 1'b0, 1);
    for (int k = 0; k < T6 + 2; k++) begin
      step(1'b1, 1'b0, 0);
      checks += 2;
      if (out5 !== acc_t'((k < T5) ? R5[k] : 0) || out6 !== acc_t'((k < T6) ? R6[k] : 0)) begin
        failures++;
        $display("FAIL impulse response at %0d: %0d / %0d", k, out5, out6);
      end
    end
    // Enable low must freeze the output and the delay line.
    step(1'b1, 1'b0, -128);
    step(1'b0, 1'b0, 77);
    step(1'b0, 1'b0, 77);
    step(1'b1, 1'b0, 0);
    for (int k = 0; k < 2000; k++)
      step(($urandom_range(3) != 0), ($urandom_range(99) == 0), int'($urandom_range(255)) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
