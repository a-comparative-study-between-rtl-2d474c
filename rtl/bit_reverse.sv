// bit_reverse: reverses the bit order of a word in one clock by wiring.
// Register A captures the input when load is high; register B is loaded
// from A through crossed wires (B[i] = A[W-1-i]) on every clock, so B holds
// the reversed word one clock after A. No logic sits between the two
// registers, which is the point of the example: an operation that takes a
// processor a sequence of mask-and-shift instructions is free in fabric.
// W = 8 as drawn in the source's register diagram (its C version uses 32).
module bit_reverse #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] reg_a,
  output logic [W-1:0] reg_b
);
  always_ff @(posedge clk) begin
    if (load) reg_a <= d;
    for (int i = 0; i < W; i++) reg_b[i] <= reg_a[W-1-i];
  end
endmodule
