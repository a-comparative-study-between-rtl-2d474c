// mul6: multiplies an unsigned W-bit value by six without a multiplier,
// as A*6 = A*4 + A*2: two copies of A wired two and one places to the left
// (zeros filling the low bits) feed one adder. The result needs W+3 bits.
// Combinational. W = 4 matches the worked example in the source
// (1101 -> 110100 + 011010 = 1001110, i.e. 13*6 = 78).
module mul6 #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  output logic [W+2:0] y
);
  logic [W+2:0] a4, a2;
  assign a4 = {1'b0, a, 2'b00};
  assign a2 = {2'b00, a, 1'b0};
  assign y  = a4 + a2;
endmodule
