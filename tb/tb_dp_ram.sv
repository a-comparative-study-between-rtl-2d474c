// tb_dp_ram: random reads and writes against a reference array, including
// reads of the address being written in the same clock (old data expected).
module tb_dp_ram;
  localparam int DW = 24, N = 20, AW = $clog2(N);
  logic clk = 0;
  logic ce0, ce1, we1;
  logic [AW-1:0] addr0, addr1;
  logic [DW-1:0] q0, d1;
  logic [DW-1:0] model [N];
  logic [DW-1:0] exp_q;
  logic          exp_v;
  int checks = 0, failures = 0, collisions = 0;

  dp_ram #(.DWIDTH(DW), .MEM_SIZE(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce0 = 0; ce1 = 0; we1 = 0; addr0 = 0; addr1 = 0; d1 = 0; exp_v = 0;
    // fill every word first so reads are defined
    for (int i = 0; i < N; i++) begin
      @(negedge clk); ce1 = 1; we1 = 1; addr1 = AW'(i); d1 = DW'($urandom); model[i] = d1;
    end
    @(negedge clk); ce1 = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (q0 !== exp_q) begin
          failures++;
          $display("read mismatch: got %h expected %h", q0, exp_q);
        end
      end
      ce0   = 1'($urandom);
      ce1   = 1'($urandom);
      we1   = 1'($urandom);
      addr0 = AW'($urandom % N);
      addr1 = ($urandom % 4 == 0) ? addr0 : AW'($urandom % N);
      d1    = DW'($urandom);
      exp_v = ce0;
      if (ce0) exp_q = model[addr0];           // read-first: old contents
      if (ce0 && ce1 && we1 && addr0 == addr1) collisions++;
      if (ce1 && we1) model[addr1] = d1;
      if (!ce0) exp_v = 0;
    end
    if (collisions == 0) failures++;
    $display("collisions tested: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
