// line_buffer: keeps the last ROWS image lines so that every incoming pixel
// can be delivered together with the pixels of the same column in the ROWS
// lines above it.
//
// The lines live in one dual-port RAM of IMG_W words; each word concatenates
// the ROWS pixels of one column (word = {line ROWS-1, ..., line 1, line 0},
// line 0 being the most recent). This is the packed form of the three
// chained RAMs of the classic line-buffer drawing: instead of RAM k feeding
// RAM k+1, a column's word is read, shifted up by one pixel slot with the
// new pixel in slot 0, and written back. One RAM replaces three.
//
// A read counter and a write counter make the RAM behave as a FIFO of one
// line per slot. On an in_valid cycle the read counter addresses column x;
// the word appears on the RAM output one cycle later, when out_valid is high
// and out_col[k] is the pixel of column x from k+1 lines above. In that same
// cycle the write counter, which trails the read counter by one pixel,
// stores the updated word back at column x. Throughput is one pixel per
// clock, latency one clock; in_valid may drop at any time (the stream just
// pauses). rst clears the counters only: the RAM starts with unknown data,
// which the window logic downstream marks as outside the image.
//
// Source description: RAM-based line buffers with read and write counters,
// three lines of IMG_W pixels, lines concatenated into one wide word.
// Own choices: the exact counter timing and the single-cycle read latency.
module line_buffer #(
  parameter int DW    = 8,
  parameter int IMG_W = 320,
  parameter int ROWS  = 3,
  localparam int AW   = (IMG_W > 1) ? $clog2(IMG_W) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic [DW-1:0] out_col [ROWS]
);
  logic [AW-1:0]      rd_cnt, wr_cnt;
  logic [DW-1:0]      pix_d;
  logic [ROWS*DW-1:0] q, d;

  // read counter: one step per accepted pixel, wraps at the line end
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_cnt <= '0;
    end else if (in_valid) begin
      rd_cnt <= (rd_cnt == AW'(IMG_W - 1)) ? '0 : rd_cnt + 1'b1;
    end
  end

  // write counter and write data trail the read by one cycle
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
    if (in_valid) begin
      wr_cnt <= rd_cnt;
      pix_d  <= in_pix;
    end
  end

  if (ROWS > 1) begin : g_shift
    assign d = {q[(ROWS-1)*DW-1:0], pix_d};
  end else begin : g_single
    assign d = pix_d;
  end

  dp_ram #(.DWIDTH(ROWS * DW), .MEM_SIZE(IMG_W)) u_ram (
    .clk   (clk),
    .ce0   (in_valid),
    .addr0 (rd_cnt),
    .q0    (q),
    .ce1   (out_valid),
    .we1   (1'b1),
    .addr1 (wr_cnt),
    .d1    (d)
  );

  for (genvar k = 0; k < ROWS; k++) begin : g_out
    assign out_col[k] = q[k*DW +: DW];
  end
endmodule
