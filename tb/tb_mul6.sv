// tb_mul6: every 4-bit input times six, including the worked example
// 1101 -> 1001110 (13 * 6 = 78).
module tb_mul6;
  logic [3:0] a;
  logic [6:0] y;
  int checks = 0, failures = 0;

  mul6 #(.W(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'b1101; #1;
    checks++;
    if (y != 7'b1001110) begin failures++; $display("13*6 gave %b", y); end
    for (int v = 0; v < 16; v++) begin
      a = 4'(v); #1;
      checks++;
      if (int'(y) != 6 * v) begin failures++; $display("%0d*6 gave %0d", v, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
