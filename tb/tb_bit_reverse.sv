// tb_bit_reverse: the drawn example (01100001 -> 10000110, top bit first)
// and random words with random loads; register B must hold the reverse of
// register A one clock after A was loaded.
module tb_bit_reverse;
  localparam int W = 8;
  logic clk = 0, load;
  logic [W-1:0] d, reg_a, reg_b, a_model;
  int checks = 0, failures = 0;

  bit_reverse #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rev(input logic [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[W-1-i] = v[i];
    return r;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1; d = 8'b0110_0001;
    @(negedge clk); @(negedge clk);
    checks++;
    if (reg_b != 8'b1000_0110) begin failures++; $display("example gave %b", reg_b); end
    a_model = d;
    for (int t = 0; t < 500; t++) begin
      load = 1'($urandom); d = W'($urandom);
      @(negedge clk);
      if (load) a_model = d;
      @(negedge clk);
      checks += 2;
      if (reg_a != a_model) begin failures++; $display("A %b expected %b", reg_a, a_model); end
      if (reg_b != rev(a_model)) begin failures++; $display("B %b expected %b", reg_b, rev(a_model)); end
      load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
