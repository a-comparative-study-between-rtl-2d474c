// erosion_kernel: binary erosion with the cross-shaped structuring element
//   [0 1 0; 1 1 1; 0 1 0]
// The output is 0 when any of the five pixels under the cross (window
// positions p1, p3, p4, p5, p7, p4 being the centre) is 0, i.e. it is the
// AND of the five bits. Purely combinational, like the source description.
module erosion_kernel (
  input  logic p1,
  input  logic p3,
  input  logic p4,
  input  logic p5,
  input  logic p7,
  output logic p_out
);
  assign p_out = p1 & p3 & p4 & p5 & p7;
endmodule
