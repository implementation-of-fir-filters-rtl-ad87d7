// byte_adder: W-bit two's complement adder with overflow detection.
//
// Adds two signed operands, either or both of which may be negative, and
// returns the W-bit sum. ovf is set when the true sum does not fit in W bits
// (both operands of one sign, result of the other). Overflow is avoided by
// sizing W rather than corrected: the filters that use this adder assert that
// ovf never rises. Keeping negative numbers in two's complement throughout
// (instead of converting sign-magnitude operands before each addition) is this
// design's choice.
//
// Interface: a, b in; s, ovf out. Purely combinational, no clock.
module byte_adder #(
  parameter int W = 32
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] s,
  output logic                ovf
);

  always_comb begin
    s   = a + b;
    ovf = (a[W-1] == b[W-1]) && (s[W-1] != a[W-1]);
  end

endmodule
