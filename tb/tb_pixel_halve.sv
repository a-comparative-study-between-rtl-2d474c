// tb_pixel_halve: a random stream with pauses; each output must be half its
// input pixel (rounded down) and come exactly one clock later.
module tb_pixel_halve;
  localparam int DW = 8;
  logic clk = 0, rst = 1, in_valid, out_valid;
  logic [DW-1:0] in_pix, out_pix;
  int expq [$];
  int checks = 0, failures = 0, pauses = 0;
  bit pend = 0;

  pixel_halve #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (out_valid != pend) begin failures++; $display("out_valid not one clock after in_valid"); end
      if (out_valid) begin
        int e;
        e = expq.pop_front();
        checks++;
        if (out_pix != DW'(e)) begin failures++; $display("got %0d expected %0d", out_pix, e); end
      end
    end
    pend = !rst && in_valid;
  end

  initial begin
    in_valid = 0; in_pix = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if ($urandom % 4 == 0) begin in_valid = 0; pauses++; end
      else begin
        in_valid = 1; in_pix = DW'($urandom);
        if (n == 1) in_pix = 8'hFF;
        expq.push_back(int'(in_pix) / 2);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0 || pauses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
