// gaussian_kernel: 3x3 Gaussian smoothing with the mask
//   [1 2 1; 2 4 2; 1 2 1] / 16
// written as per-pixel weights 1/16, 1/8, 1/4. Each weight is a power of
// two, so every pixel is divided before the additions by dropping its low
// bits (p>>4 at the corners, p>>3 at the edges, p>>2 at the centre). No
// multiplier is used and no sum grows past DW bits: the three row sums
// (at most 61, 125 and 61 for 8-bit pixels) and the total (at most 247)
// all fit, which is the point of this form. The truncation of each term
// makes the result up to 8 below floor(sum(mask*pixel)/16).
// Stage 1 registers the three row sums, stage 2 their total: latency 2,
// one result per clock. out_valid/out_inside follow in_valid/in_inside.
module gaussian_kernel #(
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic          in_inside,
  input  logic [DW-1:0] win [9],
  output logic          out_valid,
  output logic          out_inside,
  output logic [DW-1:0] out_pix
);
  logic [DW-1:0] line1, line2, line3;
  logic [1:0]    v, ins;

  always_ff @(posedge clk) begin
    line1   <= (win[0] >> 4) + (win[1] >> 3) + (win[2] >> 4);
    line2   <= (win[3] >> 3) + (win[4] >> 2) + (win[5] >> 3);
    line3   <= (win[6] >> 4) + (win[7] >> 3) + (win[8] >> 4);
    out_pix <= line1 + line2 + line3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v   <= '0;
      ins <= '0;
    end else begin
      v   <= {v[0], in_valid};
      ins <= {ins[0], in_inside & in_valid};
    end
  end
  assign out_valid  = v[1];
  assign out_inside = ins[1];
endmodule
