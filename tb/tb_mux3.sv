// tb_mux3: every input and select combination; select 3 must give 0.
module tb_mux3;
  logic a, b, c, y;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  mux3 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic e;
      {sel, c, b, a} = 5'(v);
      #1;
      case (sel)
        2'd0: e = a;
        2'd1: e = b;
        2'd2: e = c;
        default: e = 1'b0;
      endcase
      checks++;
      if (y != e) begin failures++; $display("sel %0d abc %b%b%b: got %b", sel, a, b, c, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
