// mux3: selects one of three 1-bit inputs with a 2-bit select (0 -> a,
// 1 -> b, 2 -> c). The fourth select value drives 0, so every select value
// assigns the output and the logic stays combinational: a 4-to-1
// multiplexer with one input tied low, and no latch. This is the corrected
// form of the source's case-statement example.
module mux3 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic [1:0] sel,
  output logic       y
);
  always_comb begin
    case (sel)
      2'd0:    y = a;
      2'd1:    y = b;
      2'd2:    y = c;
      default: y = 1'b0;
    endcase
  end
endmodule
