// sobel_filter: streaming Sobel edge detector. Gray-scale pixels enter in
// raster order (one per in_valid cycle); lw_buffer builds the 3x3 window
// and sobel_kernel turns it into the saturated edge weight |Gx|+|Gy|.
// One output per input pixel, 2 + 4 = 6 clocks after it. out_inside marks
// outputs whose window lay wholly inside the frame; the result then belongs
// to the image pixel at column x-1, row y-2 of the pixel that produced it
// (border pixels are not computed). rst starts a new frame.
module sobel_filter #(
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

  sobel_kernel #(.DW(DW)) u_kernel (
    .clk, .rst,
    .in_valid (w_valid), .in_inside (w_inside), .win (win),
    .out_valid, .out_inside, .out_pix
  );
endmodule
