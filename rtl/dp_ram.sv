// dp_ram: simple dual-port RAM, the storage element behind the line buffers.
// Port 0 reads synchronously: when ce0 is high, q0 takes ram[addr0] at the
// clock edge. Port 1 writes: when ce1 and we1 are high, ram[addr1] takes d1.
// A read and a write of the same address in the same cycle return the old
// contents (read-first), because both ports update on the same edge.
// The cells have no reset, as block RAM has none; only the read register
// could be reset on real parts, and it is left without one here too.
// The shape follows the dual-port RAM of the source description; the
// parameter defaults (24-bit words, 320 deep) are three concatenated 8-bit
// lines of a 320-pixel image.
module dp_ram #(
  parameter int DWIDTH   = 24,
  parameter int MEM_SIZE = 320,
  localparam int AW      = (MEM_SIZE > 1) ? $clog2(MEM_SIZE) : 1
) (
  input  logic              clk,
  // read port
  input  logic              ce0,
  input  logic [AW-1:0]     addr0,
  output logic [DWIDTH-1:0] q0,
  // write port
  input  logic              ce1,
  input  logic              we1,
  input  logic [AW-1:0]     addr1,
  input  logic [DWIDTH-1:0] d1
);
  logic [DWIDTH-1:0] ram [MEM_SIZE];

  always_ff @(posedge clk) begin
    if (ce0) q0 <= ram[addr0];
  end

  always_ff @(posedge clk) begin
    if (ce1 && we1) ram[addr1] <= d1;
  end
endmodule
