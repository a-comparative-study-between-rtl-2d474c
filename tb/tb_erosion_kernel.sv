// tb_erosion_kernel: all 32 combinations of the five cross pixels; the
// output must be 1 exactly when all five are 1.
module tb_erosion_kernel;
  logic p1, p3, p4, p5, p7, p_out;
  int checks = 0, failures = 0;

  erosion_kernel dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {p1, p3, p4, p5, p7} = 5'(v);
      #1;
      checks++;
      if (p_out != (v == 31)) begin
        failures++; $display("inputs %b: got %b", 5'(v), p_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
