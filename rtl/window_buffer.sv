// window_buffer: the ROWS x COLS active window that slides over the image.
// Each window row is a shift register: when shift is high, row r takes
// in_col[r] into column 0 and moves every pixel one column on, dropping
// the pixel in column COLS-1. All ROWS*COLS registers are outputs, in the
// order win[r*COLS + c] (for 3x3: p0 p1 p2 in row 0, p3 p4 p5 in row 1,
// p6 p7 p8 in row 2, with p0, p3, p6 the newest column). The outputs are
// valid one clock after a shift. There is no reset: the registers only
// hold pixels, and the stream control that knows whether they are
// meaningful lives outside. The shift enable is this design's addition to
// the plain register grid, so that the stream may pause.
module window_buffer #(
  parameter int DW   = 8,
  parameter int ROWS = 3,
  parameter int COLS = 3
) (
  input  logic          clk,
  input  logic          shift,
  input  logic [DW-1:0] in_col [ROWS],
  output logic [DW-1:0] win    [ROWS*COLS]
);
  logic [DW-1:0] p [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int r = 0; r < ROWS; r++) begin
        for (int c = COLS - 1; c > 0; c--) p[r][c] <= p[r][c-1];
        p[r][0] <= in_col[r];
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      assign win[r*COLS + c] = p[r][c];
    end
  end
endmodule
