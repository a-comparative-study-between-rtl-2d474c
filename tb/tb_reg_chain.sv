// tb_reg_chain: a random bit sequence; out1 must be the input one clock
// late and out2 two clocks late.
module tb_reg_chain;
  logic clk = 0, d, out1, out2;
  logic [1:0] hist;
  int checks = 0, failures = 0;

  reg_chain dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (3) @(negedge clk);   // flush both registers with zeros
    hist = 2'b00;
    for (int t = 0; t < 200; t++) begin
      d = 1'($urandom);
      @(negedge clk);
      hist = {hist[0], d};
      checks++;
      if (out1 != hist[0] || out2 != hist[1]) begin
        failures++; $display("t=%0d: out1 %b out2 %b expected %b %b", t, out1, out2, hist[0], hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
