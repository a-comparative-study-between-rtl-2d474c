// morph_closing: morphological closing of a binary image stream, dilation
// followed by erosion, both with the cross structuring element.
//
// The chain is the one of the closing-operator diagram: buffer -> dilation
// -> buffer -> erosion, where each buffer is an lw_buffer with 1-bit pixels
// (three 1-bit lines of IMG_W, 960 bits for IMG_W = 320). The dilation
// result forms a second pixel stream, one pixel per input pixel, that is
// buffered again and eroded. Swapping the two kernels would give opening.
//
// The second buffer is clocked by the first buffer's window strobe rather
// than by the input strobe, so that its pixels stay aligned with the
// dilation results when the input stream pauses (the diagram draws one
// frame_valid line into both buffers; with a continuous stream that is the
// same up to the two-clock offset handled here).
//
// Output: out_valid once per input pixel, 4 clocks after it. out_inside is
// high when every pixel that the result depends on lies inside the frame:
// the second window is then inside and each of its cross pixels came from
// an inside first window. The result then belongs to image pixel
// (x-2, y-4) of the input pixel (x, y) that produced it. Both stages are
// combinational between registers, as in the source (no extra pipeline).
module morph_closing #(
  parameter int IMG_W = 320,
  parameter int IMG_H = 240
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_pix,
  output logic out_valid,
  output logic out_inside,
  output logic out_pix
);
  logic       w1_valid, dil;
  logic [0:0] w1 [9];
  logic [0:0] w2 [9];

  lw_buffer #(.DW(1), .IMG_W(IMG_W), .IMG_H(IMG_H)) m1 (
    .clk, .rst, .in_valid, .in_pix (in_pix),
    .win_valid (w1_valid), .win_inside (), .win (w1)
  );

  dilation_kernel m2 (
    .p1 (w1[1]), .p3 (w1[3]), .p4 (w1[4]), .p5 (w1[5]), .p7 (w1[7]),
    .p_out (dil)
  );

  // stage-2 stream position k carries the dilation of stage-1 window k,
  // centred one column and two rows back; the cross of a stage-2 window
  // spans stage-2 columns x-2..x and rows y-3..y-1, so all its inputs are
  // inside when x >= 2 + 2 and y >= 3 + 3.
  lw_buffer #(.DW(1), .IMG_W(IMG_W), .IMG_H(IMG_H), .X_LO(4), .Y_LO(6)) m3 (
    .clk, .rst, .in_valid (w1_valid), .in_pix (dil),
    .win_valid (out_valid), .win_inside (out_inside), .win (w2)
  );

  erosion_kernel m4 (
    .p1 (w2[1]), .p3 (w2[3]), .p4 (w2[4]), .p5 (w2[5]), .p7 (w2[7]),
    .p_out (out_pix)
  );
endmodule
