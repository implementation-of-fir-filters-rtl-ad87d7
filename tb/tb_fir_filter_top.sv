// tb_fir_filter_top: end-to-end testbench of fir_filter_top with every
// parameter at its default (54-tap lowpass, 73-tap bandpass, 54-tap
// highpass).
//
// Phase 1 runs the design check of all three filters at once, each with its
// own published stimulus (lowpass 8, 9, 10...; bandpass 8, 61, 9, 13...;
// highpass 8, 9, 10, 11, 12...), held until every output has settled, and
// compares the published output samples. Phase 2 drives the three filters
// with independent random samples and independent random clock enables, with
// a shared reset now and then. Every output is compared every clock with a
// reference convolution whose coefficients are rebuilt from the real-valued
// window designs (tb_fir_ref_pkg).
//
// Mechanisms counted, each of which must occur: a clock-enable stall on each
// filter, a reset in the middle of a run, a settled (steady-state) output on
// each filter, and a full-scale sample on each filter.
module tb_fir_filter_top;
  import tb_fir_ref_pkg::*;

  logic               clk = 1'b0;
  logic               reset;
  logic               en [3];
  logic signed [7:0]  x  [3];
  logic signed [31:0] y  [3];

  fir_filter_top dut (
    .clk            (clk),
    .reset          (reset),
    .lpf_clk_enable (en[0]), .lpf_filter_in (x[0]), .lpf_filter_out (y[0]),
    .bpf_clk_enable (en[1]), .bpf_filter_in (x[1]), .bpf_filter_out (y[1]),
    .hpf_clk_enable (en[2]), .hpf_filter_in (x[2]), .hpf_filter_out (y[2])
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int stalls [3] = '{0, 0, 0};
  int settled [3] = '{0, 0, 0};
  int fullscale [3] = '{0, 0, 0};
  int mid_resets = 0;

  // Reference: accepted samples per filter, newest first.
  int     hist [3][73];
  longint expected [3];
  int     outs [3][160];
  int     n_out [3];
  bit     logging;

  always @(posedge clk) begin
    for (int f = 0; f < 3; f++) begin
      if (reset) begin
        for (int i = 0; i < 73; i++) hist[f][i] = 0;
        expected[f] = 0;
      end else if (en[f]) begin
        expected[f] = 0;
        for (int i = 0; i < taps_of(f); i++)
          expected[f] += longint'(coef(f, i)) * hist[f][i];
        for (int i = 72; i > 0; i--) hist[f][i] = hist[f][i-1];
        hist[f][0] = int'(x[f]);
      end
    end
  end

  // Called on a falling edge with inputs already set; checks on the next one.
  task automatic cycle();
    for (int f = 0; f < 3; f++) begin
      if (!en[f] && !reset) stalls[f]++;
      if (x[f] == -8'sd128 || x[f] == 8'sd127) fullscale[f]++;
    end
    @(negedge clk);
    for (int f = 0; f < 3; f++) begin
      checks++;
      if (y[f] !== 32'(expected[f])) begin
        failures++;
        $display("FAIL filter %0d: out=%0d expected=%0d", f, y[f], expected[f]);
      end
      if (logging && en[f] && !reset && n_out[f] < 160) outs[f][n_out[f]++] = y[f];
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Published stimuli and outputs (index 0 = one enabled clock after the
  // first non-zero sample).
  localparam int STIM [3][5] = '{'{8, 9, 10, 10, 10}, '{8, 61, 9, 13, 13},
                                 '{8, 9, 10, 11, 12}};
  localparam int NPUB [3] = '{9, 5, 5};
  localparam int PUB_IDX [3][9] = '{'{0, 1, 2, 3, 51, 52, 53, 54, 55},
                                    '{0, 1, 2, 3, 4, 0, 0, 0, 0},
                                    '{0, 1, 2, 3, 4, 0, 0, 0, 0}};
  localparam int PUB_VAL [3][9] = '{
    '{-73112, -64915, -61271, -32073, 103173, 125049, 55431, 48459, 39320},
    '{-8496, -96070, -308577, -520873, -270658, 0, 0, 0, 0},
    '{53104, 68710, 85845, 155464, 195845, 0, 0, 0, 0}};

  initial begin
    reset   = 1'b1;
    logging = 1'b0;
    for (int f = 0; f < 3; f++) begin
      en[f] = 1'b0;
      x[f]  = '0;
      n_out[f] = 0;
      expected[f] = 0;
      for (int i = 0; i < 73; i++) hist[f][i] = 0;
    end
    @(negedge clk);
    @(negedge clk);

    // Phase 1: published runs, all three filters together.
    reset = 1'b0;
    for (int f = 0; f < 3; f++) begin
      en[f] = 1'b1;
      x[f]  = 8'(STIM[f][0]);
    end
    cycle();
    logging = 1'b1;
    for (int k = 1; k < 90; k++) begin
      for (int f = 0; f < 3; f++) x[f] = 8'(STIM[f][(k < 5) ? k : 4]);
      cycle();
    end
    logging = 1'b0;
    for (int f = 0; f < 3; f++) begin
      for (int k = 0; k < NPUB[f]; k++) begin
        checks++;
        if (outs[f][PUB_IDX[f][k]] != PUB_VAL[f][k]) begin
          failures++;
          $display("FAIL filter %0d published output %0d: got %0d, published %0d",
                   f, PUB_IDX[f][k], outs[f][PUB_IDX[f][k]], PUB_VAL[f][k]);
        end
      end
      // Settled: the last outputs of the held input no longer change.
      if (outs[f][n_out[f]-1] == outs[f][n_out[f]-2] &&
          outs[f][n_out[f]-1] == outs[f][n_out[f]-10]) settled[f]++;
    end

    // Phase 2: independent random traffic with stalls and resets.
    for (int k = 0; k < 1500; k++) begin
      reset = (k > 0) && ($urandom_range(199) == 0);
      if (reset) mid_resets++;
      for (int f = 0; f < 3; f++) begin
        en[f] = ($urandom_range(4) != 0);
        case ($urandom_range(9))
          0:       x[f] = -8'sd128;
          1:       x[f] = 8'sd127;
          default: x[f] = 8'($urandom);
        endcase
      end
      cycle();
    end
    reset = 1'b0;

    for (int f = 0; f < 3; f++) begin
      $display("filter %0d: stalls=%0d settled=%0d full-scale samples=%0d",
               f, stalls[f], settled[f], fullscale[f]);
      checks += 3;
      if (stalls[f] == 0)    begin failures++; $display("FAIL no stall on filter %0d", f); end
      if (settled[f] == 0)   begin failures++; $display("FAIL filter %0d never settled", f); end
      if (fullscale[f] == 0) begin failures++; $display("FAIL no full-scale sample on filter %0d", f); end
    end
    $display("mid-run resets=%0d", mid_resets);
    checks++;
    if (mid_resets == 0) begin failures++; $display("FAIL no reset in mid-run"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
