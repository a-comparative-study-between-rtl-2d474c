// sobel_kernel: Sobel edge magnitude of one 3x3 window per clock, in four
// pipeline stages, following the four steps of the source description:
//   1. gradients  Gy = (p0-p6) + 2(p1-p7) + (p2-p8)   (rows 0 and 2)
//                 Gx = (p2-p0) + 2(p5-p3) + (p8-p6)   (columns 2 and 0)
//      with the doubling done by wiring (a shift), not a multiplier;
//   2. absolute values |Gx|, |Gy| (two's-complement negate when negative);
//   3. sum |Gx| + |Gy|, the square root of squares being replaced by this sum;
//   4. saturation: a sum above 2^DW-1 becomes 2^DW-1 (255 for 8 bits).
// Gradients need DW+3 bits signed (|G| <= 4*(2^DW-1)); the sum fits DW+3 bits
// unsigned. win[r*3+c] is window row r, column c. out_valid/out_inside are
// in_valid/in_inside delayed by the four stages; latency 4, one result per
// clock. The pipeline does not stall; only the valid bits are reset.
module sobel_kernel #(
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
  localparam int GW = DW + 3;

  logic signed [GW-1:0] gx, gy;
  logic        [GW-1:0] abs_gx, abs_gy, sum;
  logic [3:0] v, ins;

  function automatic logic signed [GW-1:0] ext(input logic [DW-1:0] a);
    return signed'({3'b000, a});
  endfunction

  always_ff @(posedge clk) begin
    // step 1: gradients
    gy <= (ext(win[0]) - ext(win[6])) + ((ext(win[1]) - ext(win[7])) <<< 1)
        + (ext(win[2]) - ext(win[8]));
    gx <= (ext(win[2]) - ext(win[0])) + ((ext(win[5]) - ext(win[3])) <<< 1)
        + (ext(win[8]) - ext(win[6]));
    // step 2: absolute values
    abs_gy <= gy[GW-1] ? GW'(-gy) : GW'(gy);
    abs_gx <= gx[GW-1] ? GW'(-gx) : GW'(gx);
    // step 3: edge weight
    sum <= abs_gx + abs_gy;
    // step 4: limit to the largest pixel value
    out_pix <= (|sum[GW-1:DW]) ? {DW{1'b1}} : sum[DW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v   <= '0;
      ins <= '0;
    end else begin
      v   <= {v[2:0], in_valid};
      ins <= {ins[2:0], in_inside & in_valid};
    end
  end
  assign out_valid  = v[3];
  assign out_inside = ins[3];
endmodule
