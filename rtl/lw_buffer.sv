// lw_buffer: line buffers followed by the 3x3 window buffer, the front end
// shared by every kernel filter ("buffer" in the closing-operator chain).
//
// Pixels arrive in raster order, one per in_valid cycle. The line buffer
// returns, for the incoming pixel at column x of row y, the pixels of column
// x from rows y-1, y-2 and y-3; these enter the window buffer as its newest
// column. So after the shift the window covers rows y-1..y-3 and columns
// x..x-2, centred on pixel (x-1, y-2). Window row 0 is row y-1 and window
// column 0 is column x (the window is mirrored in both directions relative
// to the image; the symmetric kernels used here do not care, and Sobel's
// absolute values do not either).
//
// Column and row counters follow the input; win_inside is high when the
// window lies wholly inside the current frame (y >= Y_LO = 3 and
// x >= X_LO = 2; a second stage in a chain raises these limits), which
// leaves out the border pixels exactly as the source's loops do (centre
// rows 1..IMG_H-3, centre columns 1..IMG_W-2). Outputs that are not inside
// still appear, one per input pixel, so the output stream stays aligned.
//
// Timing: win_valid and win are updated two clocks after in_valid; one
// pixel per clock. rst clears the counters (start of a frame).
module lw_buffer #(
  parameter int DW    = 8,
  parameter int IMG_W = 320,
  parameter int IMG_H = 240,
  parameter int X_LO  = 2,
  parameter int Y_LO  = 3,
  localparam int XW   = $clog2(IMG_W + 1),
  localparam int YW   = $clog2(IMG_H + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          win_valid,
  output logic          win_inside,
  output logic [DW-1:0] win [9]
);
  localparam int ROWS = 3;
  localparam int COLS = 3;

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          lb_valid, inside_d;
  logic [DW-1:0] lb_col [ROWS];

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0;
      y <= '0;
    end else if (in_valid) begin
      if (x == XW'(IMG_W - 1)) begin
        x <= '0;
        y <= (y == YW'(IMG_H - 1)) ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      win_valid  <= 1'b0;
      inside_d   <= 1'b0;
      win_inside <= 1'b0;
    end else begin
      win_valid  <= lb_valid;
      inside_d   <= in_valid && (y >= YW'(Y_LO)) && (x >= XW'(X_LO));
      win_inside <= lb_valid && inside_d;
    end
  end

  line_buffer #(.DW(DW), .IMG_W(IMG_W), .ROWS(ROWS)) u_lines (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in_pix    (in_pix),
    .out_valid (lb_valid),
    .out_col   (lb_col)
  );

  window_buffer #(.DW(DW), .ROWS(ROWS), .COLS(COLS)) u_window (
    .clk    (clk),
    .shift  (lb_valid),
    .in_col (lb_col),
    .win    (win)
  );
endmodule
