// tb_fir_highpass: self-checking testbench of fir_highpass.
//
// Part 1 replays the design check of this filter: after reset the input
// steps through 8, 9, 10, 11, 12 (held), and the output samples
// published for that run are compared at their positions (output index 0 is
// the output one enabled clock after the first non-zero sample). The whole
// output sequence of that run is also compared with a reference convolution
// whose coefficients are rebuilt from the real-valued window design
// (tb_fir_ref_pkg), and the latency is checked: nothing before index 0,
// h(0) x at index 0. Part 2 drives random full-range samples with a random
// clock enable and occasional resets and compares every clock.
module tb_fir_highpass;
  import tb_fir_ref_pkg::*;

  localparam int KIND = 2;
  localparam int TAPS = 54;
  localparam int NPUB = 5;
  localparam int PUB_IDX [NPUB] = '{0, 1, 2, 3, 4};
  localparam int PUB_VAL [NPUB] = '{53104, 68710, 85845, 155464, 195845};
  localparam int NPRE = 4;
  localparam int PRE [NPRE] = '{8, 9, 10, 11};

  logic              clk = 1'b0;
  logic              clk_enable;
  logic              reset;
  logic signed [7:0] filter_in;
  logic signed [31:0] filter_out;

  int checks = 0;
  int failures = 0;

  fir_highpass dut (.*);

  always #5 clk = ~clk;

  // Reference model: accepted samples, newest first.
  int     hist [TAPS];
  longint expected;
  int     outs [200];
  int     n_out;
  bit     log_outs;

  function automatic longint conv();
    longint acc = 0;
    for (int i = 0; i < TAPS; i++) acc += longint'(coef(KIND, i)) * hist[i];
    return acc;
  endfunction

  always @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < TAPS; i++) hist[i] = 0;
      expected = 0;
    end else if (clk_enable) begin
      expected = conv();
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(filter_in);
    end
  end

  task automatic check_out(string what);
    checks++;
    if (filter_out !== 32'(expected)) begin
      failures++;
      $display("FAIL %s: filter_out=%0d expected=%0d", what, filter_out, expected);
    end
  endtask

  // Called on a falling edge: drive, let one rising edge pass, check on the
  // next falling edge.
  task automatic step(logic en, logic rst, logic signed [7:0] x, string what);
    clk_enable = en;
    reset      = rst;
    filter_in  = x;
    @(negedge clk);
    check_out(what);
    if (log_outs && en && !rst && n_out < 200) outs[n_out++] = filter_out;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_enable = 1'b0;
    reset      = 1'b1;
    filter_in  = '0;
    log_outs   = 1'b0;
    n_out      = 0;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    expected = 0;
    repeat (3) @(negedge clk);

    // Part 1: published stimulus. The first step accepts PRE[0]; the output
    // of the following enabled clock is output index 0.
    step(1'b1, 1'b0, 8'(PRE[0]), "published run");
    checks++;
    if (filter_out !== 0) begin
      failures++;
      $display("FAIL latency: output non-zero in the clock that samples the first input");
    end
    log_outs = 1'b1;
    for (int k = 1; k < NPRE; k++) step(1'b1, 1'b0, 8'(PRE[k]), "published run");
    for (int k = 0; k < TAPS + 10; k++) step(1'b1, 1'b0, 8'(12), "published run");
    log_outs = 1'b0;
    checks++;
    if (outs[0] != coef(KIND, 0) * PRE[0]) begin
      failures++;
      $display("FAIL latency: output index 0 is %0d, not h(0)*x(0)", outs[0]);
    end
    for (int k = 0; k < NPUB; k++) begin
      checks++;
      if (outs[PUB_IDX[k]] != PUB_VAL[k]) begin
        failures++;
        $display("FAIL published output %0d: got %0d, published %0d",
                 PUB_IDX[k], outs[PUB_IDX[k]], PUB_VAL[k]);
      end
    end

    // Part 2: random samples, random enable, occasional reset.
    for (int k = 0; k < 600; k++) begin
      step(($urandom_range(3) != 0), ($urandom_range(99) == 0),
           8'($urandom), "random run");
    end
    // Largest magnitudes: extreme samples held for a full window.
    for (int k = 0; k < TAPS + 2; k++) step(1'b1, 1'b0, -8'sd128, "full-scale run");
    for (int k = 0; k < TAPS + 2; k++) step(1'b1, 1'b0, 8'sd127, "full-scale run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
