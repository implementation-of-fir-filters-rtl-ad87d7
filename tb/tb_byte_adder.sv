// tb_byte_adder: self-checking testbench of byte_adder at its default width.
//
// Drives corner operands (zero, +/-1, the extremes) and random operands of
// both signs, and compares the sum and the overflow flag with a reference
// computed in wider arithmetic: the sum is the true sum modulo 2^W, and
// overflow is set exactly when the true sum lies outside the W-bit range.
module tb_byte_adder;
  localparam int W = 32;

  logic signed [W-1:0] a, b, s;
  logic                ovf;
  logic                clk = 1'b0;
  int checks = 0;
  int failures = 0;

  byte_adder #(.W(W)) dut (.a(a), .b(b), .s(s), .ovf(ovf));

  always #5 clk = ~clk;

  task automatic try(logic signed [W-1:0] x, logic signed [W-1:0] y);
    longint t;
    bit     exp_ovf;
    a = x;
    b = y;
    #1;
    t = longint'(x) + longint'(y);
    exp_ovf = (t > longint'(2**(W-1) - 1)) || (t < -longint'(2**(W-1)));
    checks++;
    if (s !== W'(t) || ovf !== exp_ovf) begin
      failures++;
      $display("FAIL %0d + %0d: s=%0d ovf=%0b, expected s=%0d ovf=%0b",
               x, y, s, ovf, W'(t), exp_ovf);
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
    logic signed [W-1:0] maxv, minv;
    maxv = {1'b0, {(W-1){1'b1}}};
    minv = {1'b1, {(W-1){1'b0}}};
    try(0, 0);
    try(1, -1);
    try(-1, -1);
    try(maxv, 1);
    try(minv, -1);
    try(maxv, maxv);
    try(minv, minv);
    try(maxv, minv);
    try(-73112, 17336);
    for (int k = 0; k < 2000; k++) try(W'($urandom), W'($urandom));
    for (int k = 0; k < 2000; k++)
      try(W'($signed(24'($urandom))), W'($signed(24'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
