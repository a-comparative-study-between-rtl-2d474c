// reg_chain: two registers in series. On each clock out1 takes d and out2
// takes the previous out1, so out2 is d delayed by two clocks. This is the
// hardware that non-blocking assignments describe in the source's example
// (the blocking version would instead load both registers from d).
module reg_chain (
  input  logic clk,
  input  logic d,
  output logic out1,
  output logic out2
);
  always_ff @(posedge clk) begin
    out1 <= d;
    out2 <= out1;
  end
endmodule
