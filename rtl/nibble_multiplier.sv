// nibble_multiplier: signed A_W x B_W multiplier built from shifts and adds.
//
// Forms the full 2n-style product (A_W + B_W bits) of a two's complement
// sample a and a two's complement coefficient b without a multiplier
// operator: for every bit of b the sign-extended a is shifted left by that
// bit's weight and accumulated; the partial product of b's sign bit has
// negative weight and is subtracted. This is the shift-accumulate scheme of a
// register-A / register-B / shift-accumulator multiplier, unrolled so that
// the whole product is ready within one clock (the filter delivers one
// output per clock), which is this design's choice.
//
// Interface: a, b in; p out. Purely combinational, no clock.
module nibble_multiplier #(
  parameter int A_W = 8,
  parameter int B_W = 15
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int P_W = A_W + B_W;

  logic signed [P_W-1:0] a_ext;
  logic signed [P_W-1:0] acc;

  always_comb begin
    a_ext = P_W'(a);  // sign extension of a to the product width
    acc   = '0;
    for (int i = 0; i < B_W - 1; i++) begin
      if (b[i]) acc = acc + (a_ext <<< i);
    end
    if (b[B_W-1]) acc = acc - (a_ext <<< (B_W - 1));
    p = acc;
  end

endmodule
