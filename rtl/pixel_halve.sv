// pixel_halve: divides every pixel of a stream by two. Division by a power
// of two needs no arithmetic: the output register takes the input pixel
// wired one bit to the right, with a zero in the top bit. The stream
// follows the source's example (a 320x240 gray-scale image passed through
// one pixel per clock); its handshake here is a plain valid strobe, with
// the result and out_valid one clock after in_valid. rst clears out_valid.
// The lowest input bit is the remainder and is dropped by design, and the
// top output bit is always zero; lint reports both, and both are intended.
module pixel_halve #(
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic [DW-1:0] out_pix
);
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    if (in_valid) out_pix <= {1'b0, in_pix[DW-1:1]};
  end
endmodule
