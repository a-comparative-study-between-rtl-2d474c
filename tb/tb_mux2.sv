// tb_mux2: all eight input combinations.
module tb_mux2;
  logic a, b, sel, y;
  int checks = 0, failures = 0;

  mux2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, b, a} = 3'(v);
      #1;
      checks++;
      if (y != (sel ? b : a)) begin failures++; $display("sel %b a %b b %b: got %b", sel, a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
