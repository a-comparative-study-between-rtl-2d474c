// gaussian_filter: streaming 3x3 Gaussian smoothing filter. Gray-scale pixels enter in
// raster order (one per in_valid cycle); lw_buffer builds the 3x3 window
// and gaussian_kernel turns it into the weighted mean (mask [1 2 1;2 4 2;1 2 1]/16).
// One output per input pixel, 2 + 2 = 4 clocks after it. out_inside marks
// outputs whose window lay wholly inside the frame; the result then belongs
// to the image pixel at column x-1, row y-2 of the pixel that produced it
// (border pixels are not computed). rst starts a new frame.
module gaussian_filter #(
  parameter int DW    = 8,
  parameter int IMG_W = 320,
  parameter int IMG_H = 240
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic          out_inside,
  output logic [DW-1:0] out_pix
);
  logic          w_valid, w_inside;
  logic [DW-1:0] win [9];

  lw_buffer #(.DW(DW), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_buf (
    .clk, .rst, .in_valid, .in_pix,
    .win_valid (w_valid), .win_inside (w_inside), .win (win)
  );

  gaussian_kernel #(.DW(DW)) u_kernel (
    .clk, .rst,
    .in_valid (w_valid), .in_inside (w_inside), .win (win),
    .out_valid, .out_inside, .out_pix
  );
endmodule
