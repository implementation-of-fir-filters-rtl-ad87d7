// delay_ram: the delay line of a direct-form FIR filter, a shift register of
// DEPTH words of W bits.
//
// Each enabled clock the array shifts by one word: word 0 takes d and word k
// takes word k-1, the oldest word falling off the end. The array size stays
// DEPTH. Word k therefore holds the input of k+1 enabled clocks ago, i.e.
// x(n-1-k) when d carries x(n). All words are visible on q for the tap
// multipliers.
//
// Interface: clk, synchronous active-high reset (clears every word, the
// reset value being this design's choice), en (the filter's clk_enable),
// d in, q[DEPTH] out. One clock from d to q[0].
module delay_ram #(
  parameter int W     = 8,
  parameter int DEPTH = 53
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                en,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q [DEPTH]
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else if (en) begin
      mem[0] <= d;
      for (int k = 1; k < DEPTH; k++) mem[k] <= mem[k-1];
    end
  end

  assign q = mem;

endmodule
