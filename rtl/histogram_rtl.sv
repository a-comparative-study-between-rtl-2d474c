// histogram_rtl: gray-level histogram that counts one pixel per clock in a
// dual-port memory (one word per gray level), then reads the bins out.
//
// Structure (after the histogram architecture of the source): a memory
// indexed either by the incoming pixel or by a 0..BINS-1 counter; a +1
// adder writing the incremented count back; Is_Data_Ready (data_ready here)
// choosing between counting (low) and reading out (high), and enabling the
// counter. The memory is read-first (a read and a write of one address in
// the same clock return the old word) and its read data is used directly,
// with no output register, so a count is read in one clock and written back
// in the next: one pixel per clock.
//
// Two-stage pipeline. Stage 0 issues the read (address = pixel, or the
// counter). Stage 1 acts on the word read: count mode writes word+1 back,
// readout mode presents the word on out_count and writes 0 back (so the
// memory is empty again for the next frame), clear mode writes 0. When two
// consecutive pixels are equal, the read of the second happens in the same
// clock as the write of the first and, read-first, misses it; a forwarding
// register holding the last write (address, data) supplies the new value
// instead. That bypass, the clear-on-read and the clearing sweep after
// reset are this design's own choices; the source leaves them open.
//
// Interface: after rst the unit spends BINS clocks clearing (busy high,
// in_ready low). Then pixels are accepted when in_valid && in_ready
// (in_ready = !busy && !data_ready). While data_ready is high the counter
// steps through the bins, one per clock; out_valid, out_bin and out_count
// follow one clock after each step, out_last marks bin BINS-1. A count
// saturates at 2^CW-1. Counts are final one clock after the last pixel.
module histogram_rtl #(
  parameter int BINS = 256,
  parameter int CW   = 17,
  localparam int AW  = $clog2(BINS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [AW-1:0] in_pix,
  input  logic          data_ready,
  output logic          busy,
  output logic          out_valid,
  output logic          out_last,
  output logic [AW-1:0] out_bin,
  output logic [CW-1:0] out_count
);
  typedef enum logic [1:0] {OP_NONE, OP_INC, OP_READ, OP_CLEAR} op_e;

  logic [AW-1:0] cnt;          // 0..BINS-1 counter (readout and clearing)
  logic          clearing;
  op_e           op0, op1;
  logic [AW-1:0] addr0, addr1;
  logic [CW-1:0] q, word;
  logic          we;
  logic [CW-1:0] wdata;
  logic          fwd_v;
  logic [AW-1:0] fwd_a;
  logic [CW-1:0] fwd_d;

  assign busy     = clearing;
  assign in_ready = !clearing && !data_ready;

  // stage 0: choose the operation and the memory index
  always_comb begin
    if (clearing) begin
      op0   = OP_CLEAR;
      addr0 = cnt;
    end else if (data_ready) begin
      op0   = OP_READ;
      addr0 = cnt;
    end else if (in_valid) begin
      op0   = OP_INC;
      addr0 = in_pix;
    end else begin
      op0   = OP_NONE;
      addr0 = in_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      clearing <= 1'b1;
      op1      <= OP_NONE;
    end else begin
      op1 <= op0;
      if (clearing || data_ready) begin
        cnt <= (cnt == AW'(BINS - 1)) ? '0 : cnt + 1'b1;
        if (clearing && cnt == AW'(BINS - 1)) clearing <= 1'b0;
      end
    end
    addr1 <= addr0;
  end

  // stage 1: the word read, corrected by the write made in the read's clock
  assign word  = (fwd_v && fwd_a == addr1) ? fwd_d : q;
  assign we    = (op1 != OP_NONE);
  assign wdata = (op1 == OP_INC) ? ((&word) ? word : word + 1'b1) : '0;

  always_ff @(posedge clk) begin
    if (rst) fwd_v <= 1'b0;
    else     fwd_v <= we;
    fwd_a <= addr1;
    fwd_d <= wdata;
  end

  dp_ram #(.DWIDTH(CW), .MEM_SIZE(BINS)) u_mem (
    .clk   (clk),
    .ce0   (1'b1),
    .addr0 (addr0),
    .q0    (q),
    .ce1   (1'b1),
    .we1   (we),
    .addr1 (addr1),
    .d1    (wdata)
  );

  assign out_valid = (op1 == OP_READ);
  assign out_last  = out_valid && (addr1 == AW'(BINS - 1));
  assign out_bin   = addr1;
  assign out_count = word;
endmodule
