// dilation_kernel: binary dilation with the cross-shaped structuring element
//   [0 1 0; 1 1 1; 0 1 0]
// The output is 1 when any of the five pixels under the cross (window
// positions p1, p3, p4, p5, p7, p4 being the centre) is 1. Purely
// combinational: the OR of five bits is short enough that no pipeline
// register is needed, as in the source description.
module dilation_kernel (
  input  logic p1,
  input  logic p3,
  input  logic p4,
  input  logic p5,
  input  logic p7,
  output logic p_out
);
  assign p_out = p1 | p3 | p4 | p5 | p7;
endmodule
