// histogram_acc: gray-level histogram that resolves the read-after-write
// dependency with an accumulator instead of a special memory mode.
//
// While successive pixels carry the same value, their count grows in an
// accumulator register and the memory is not touched. When the value
// changes, the accumulator is written to the memory at the old value (old
// pixel register) and reloaded with the new value's stored count plus one.
// A comparator (new == old) steers these two cases, as in the
// accumulator-based histogram architecture of the source. The memory is a
// simple dual-port RAM: read index = incoming pixel, write index = old pixel.
//
// Two-stage pipeline: stage 0 reads the memory at the incoming pixel;
// stage 1 compares with the old pixel and updates the accumulator or
// writes back. With a synchronous read, a pattern a,b,a reads a in the
// clock that writes a's finished run; a forwarding register holding that
// write supplies the up-to-date count (this design's choice, as are the
// clearing sweep after reset and clear-on-read).
//
// The run still open in the accumulator at the end of a frame is not
// written separately: during readout (data_ready high) the bin that equals
// the old pixel is taken from the accumulator, which then closes.
// Interface and timing are those of histogram_rtl: BINS clocks of clearing
// after rst (busy), in_ready = !busy && !data_ready, readout one bin per
// clock with out_valid/out_bin/out_count one clock after each counter step,
// out_last on bin BINS-1; counts saturate at 2^CW-1.
module histogram_acc #(
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

  logic [AW-1:0] cnt;
  logic          clearing;
  op_e           op0, op1;
  logic [AW-1:0] addr0, addr1;
  logic [CW-1:0] q, word;
  logic          acc_v;       // a run is open in the accumulator
  logic [AW-1:0] old_pix;     // old pixel register
  logic [CW-1:0] acc;         // accumulator register
  logic          same;        // comparator: new == old
  logic          we;
  logic [AW-1:0] waddr;
  logic [CW-1:0] wdata;
  logic          fwd_v;
  logic [AW-1:0] fwd_a;
  logic [CW-1:0] fwd_d;

  assign busy     = clearing;
  assign in_ready = !clearing && !data_ready;

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

  assign word = (fwd_v && fwd_a == addr1) ? fwd_d : q;
  assign same = acc_v && (old_pix == addr1);

  // stage 1 memory write: close a run, clear a bin, or clear on readout
  always_comb begin
    we    = 1'b0;
    waddr = addr1;
    wdata = '0;
    case (op1)
      OP_INC: begin
        if (!same && acc_v) begin
          we    = 1'b1;
          waddr = old_pix;
          wdata = acc;
        end
      end
      OP_READ, OP_CLEAR: we = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_v <= 1'b0;
      fwd_v <= 1'b0;
    end else begin
      fwd_v <= we;
      case (op1)
        OP_INC: begin
          acc_v <= 1'b1;
          if (!same) old_pix <= addr1;
        end
        OP_READ:  if (same) acc_v <= 1'b0;
        OP_CLEAR: acc_v <= 1'b0;
        default: ;
      endcase
    end
    if (op1 == OP_INC) begin
      if (same) acc <= (&acc) ? acc : acc + 1'b1;
      else      acc <= (&word) ? word : word + 1'b1;
    end
    fwd_a <= waddr;
    fwd_d <= wdata;
  end

  dp_ram #(.DWIDTH(CW), .MEM_SIZE(BINS)) u_mem (
    .clk   (clk),
    .ce0   (1'b1),
    .addr0 (addr0),
    .q0    (q),
    .ce1   (1'b1),
    .we1   (we),
    .addr1 (waddr),
    .d1    (wdata)
  );

  assign out_valid = (op1 == OP_READ);
  assign out_last  = out_valid && (addr1 == AW'(BINS - 1));
  assign out_bin   = addr1;
  assign out_count = same ? acc : word;
endmodule
