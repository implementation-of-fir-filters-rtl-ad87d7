// tb_delay_ram: self-checking testbench of delay_ram at its default size
// (53 words of 8 bits).
//
// Random samples are shifted in under a random enable with occasional
// synchronous resets. A queue model of the line (newest first) is updated on
// every enabled rising edge and compared word by word with q on the next
// falling edge: q[k] must hold the sample accepted k+1 enabled clocks earlier,
// the line must hold still while en is low, and reset must clear every word.
module tb_delay_ram;
  localparam int W = 8;
  localparam int DEPTH = 53;

  logic                clk = 1'b0;
  logic                reset, en;
  logic signed [W-1:0] d;
  logic signed [W-1:0] q [DEPTH];
  logic signed [W-1:0] model [DEPTH];
  int checks = 0;
  int failures = 0;
  int holds = 0;

  delay_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < DEPTH; k++) model[k] = '0;
    end else if (en) begin
      for (int k = DEPTH - 1; k > 0; k--) model[k] = model[k-1];
      model[0] = d;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    en    = 1'b0;
    d     = '0;
    @(negedge clk);
    for (int n = 0; n < 1000; n++) begin
      reset = (n > 100) && ($urandom_range(149) == 0);
      en    = ($urandom_range(3) != 0);
      d     = W'($urandom);
      if (!en && !reset) holds++;
      @(negedge clk);
      for (int k = 0; k < DEPTH; k++) begin
        checks++;
        if (q[k] !== model[k]) begin
          failures++;
          $display("FAIL cycle %0d word %0d: q=%0d expected %0d", n, k, q[k], model[k]);
        end
      end
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL the enable was never low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
