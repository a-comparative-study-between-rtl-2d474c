// mux2: two-to-one multiplexer, y = sel ? b : a. The source shows it at
// three levels of description (gates, a continuous assignment, a
// procedural block); all describe the same logic, (!sel & a) | (sel & b),
// which is written here once as a continuous assignment. Combinational.
module mux2 (
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic y
);
  assign y = (!sel & a) | (sel & b);
endmodule
