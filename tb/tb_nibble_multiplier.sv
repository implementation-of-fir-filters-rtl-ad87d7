// tb_nibble_multiplier: self-checking testbench of nibble_multiplier with the
// filter's operand widths (8-bit sample, 15-bit coefficient).
//
// Every sample value is multiplied by the coefficient extremes and by random
// coefficients; the product is compared with the integer product computed by
// the testbench.
module tb_nibble_multiplier;
  localparam int A_W = 8;
  localparam int B_W = 15;

  logic signed [A_W-1:0]     a;
  logic signed [B_W-1:0]     b;
  logic signed [A_W+B_W-1:0] p;
  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;

  nibble_multiplier #(.A_W(A_W), .B_W(B_W)) dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  task automatic try(int x, int y);
    int exp_p;
    a = A_W'(x);
    b = B_W'(y);
    #1;
    exp_p = x * y;
    checks++;
    if (int'(p) != exp_p) begin
      failures++;
      $display("FAIL %0d * %0d: p=%0d expected %0d", x, y, p, exp_p);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++) begin
      try(x, 0);
      try(x, 1);
      try(x, -1);
      try(x, 16383);
      try(x, -16384);
      try(x, -9139);
      for (int k = 0; k < 8; k++) try(x, int'($urandom_range(32767)) - 16384);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
