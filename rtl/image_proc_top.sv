// image_proc_top: the set of streaming image-processing units side by side.
//
// One gray-scale pixel stream (raster order, pix_valid/pix_ready) feeds, in
// parallel:
//   - sobel_filter     edge magnitude |Gx|+|Gy|, saturated     (6 clocks)
//   - gaussian_filter  3x3 Gaussian blur with shift-only weights (4 clocks)
//   - histogram_rtl    read-first memory histogram, one pixel per clock
//   - histogram_acc    accumulator-based histogram, one pixel per clock
//   - pixel_halve      every pixel divided by two by wiring     (1 clock)
// A pixel is taken when pix_valid && pix_ready; pix_ready is low while the
// histograms clear their memories after rst or read out (hist_data_ready).
// A separate 1-bit stream feeds morph_closing (dilation then erosion with
// the cross structuring element). The bit-reversal register pair and the
// shift-and-add multiply-by-six stand alone with their own ports, as do the
// coding examples (two- and three-input multiplexers, two registers in
// series).
// rst is synchronous and active high and starts a frame in every unit.
// Filter outputs carry *_inside, high when the window lay inside the frame.
module image_proc_top #(
  parameter int DW    = img_pkg::PIX_W,
  parameter int IMG_W = img_pkg::IMG_W,
  parameter int IMG_H = img_pkg::IMG_H,
  parameter int CW    = img_pkg::HIST_CW
) (
  input  logic          clk,
  input  logic          rst,
  // gray-scale stream
  input  logic          pix_valid,
  output logic          pix_ready,
  input  logic [DW-1:0] pix_in,
  output logic          sobel_valid,
  output logic          sobel_inside,
  output logic [DW-1:0] sobel_pix,
  output logic          gauss_valid,
  output logic          gauss_inside,
  output logic [DW-1:0] gauss_pix,
  output logic          half_valid,
  output logic [DW-1:0] half_pix,
  // histograms: readout request, then one bin per clock from each unit
  input  logic          hist_data_ready,
  output logic          hist_busy,
  output logic          hr_valid,
  output logic          hr_last,
  output logic [DW-1:0] hr_bin,
  output logic [CW-1:0] hr_count,
  output logic          ha_valid,
  output logic          ha_last,
  output logic [DW-1:0] ha_bin,
  output logic [CW-1:0] ha_count,
  // binary stream
  input  logic          bin_valid,
  input  logic          bin_in,
  output logic          close_valid,
  output logic          close_inside,
  output logic          close_pix,
  // bit reversal
  input  logic          rev_load,
  input  logic [7:0]    rev_in,
  output logic [7:0]    rev_a,
  output logic [7:0]    rev_out,
  // multiply by six
  input  logic [3:0]    m6_a,
  output logic [6:0]    m6_y,
  // coding examples
  input  logic [1:0]    mux2_in,
  input  logic          mux2_sel,
  output logic          mux2_out,
  input  logic [2:0]    mux_in,
  input  logic [1:0]    mux_sel,
  output logic          mux_out,
  input  logic          chain_d,
  output logic          chain_q1,
  output logic          chain_q2
);
  logic take, hr_ready, ha_ready, hr_busy, ha_busy;

  assign pix_ready = hr_ready && ha_ready;
  assign take      = pix_valid && pix_ready;
  assign hist_busy = hr_busy || ha_busy;

  sobel_filter #(.DW(DW), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_sobel (
    .clk, .rst, .in_valid (take), .in_pix (pix_in),
    .out_valid (sobel_valid), .out_inside (sobel_inside), .out_pix (sobel_pix)
  );

  gaussian_filter #(.DW(DW), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_gauss (
    .clk, .rst, .in_valid (take), .in_pix (pix_in),
    .out_valid (gauss_valid), .out_inside (gauss_inside), .out_pix (gauss_pix)
  );

  histogram_rtl #(.BINS(2**DW), .CW(CW)) u_hist_rtl (
    .clk, .rst, .in_valid (take), .in_ready (hr_ready), .in_pix (pix_in),
    .data_ready (hist_data_ready), .busy (hr_busy),
    .out_valid (hr_valid), .out_last (hr_last), .out_bin (hr_bin), .out_count (hr_count)
  );

  histogram_acc #(.BINS(2**DW), .CW(CW)) u_hist_acc (
    .clk, .rst, .in_valid (take), .in_ready (ha_ready), .in_pix (pix_in),
    .data_ready (hist_data_ready), .busy (ha_busy),
    .out_valid (ha_valid), .out_last (ha_last), .out_bin (ha_bin), .out_count (ha_count)
  );

  morph_closing #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_close (
    .clk, .rst, .in_valid (bin_valid), .in_pix (bin_in),
    .out_valid (close_valid), .out_inside (close_inside), .out_pix (close_pix)
  );

  bit_reverse #(.W(8)) u_rev (
    .clk, .load (rev_load), .d (rev_in), .reg_a (rev_a), .reg_b (rev_out)
  );

  mul6 #(.W(4)) u_mul6 (.a (m6_a), .y (m6_y));

  pixel_halve #(.DW(DW)) u_half (
    .clk, .rst, .in_valid (take), .in_pix (pix_in),
    .out_valid (half_valid), .out_pix (half_pix)
  );

  mux2 u_mux2 (.a (mux2_in[0]), .b (mux2_in[1]), .sel (mux2_sel), .y (mux2_out));

  mux3 u_mux3 (.a (mux_in[0]), .b (mux_in[1]), .c (mux_in[2]), .sel (mux_sel), .y (mux_out));

  reg_chain u_chain (.clk, .d (chain_d), .out1 (chain_q1), .out2 (chain_q2));
endmodule
