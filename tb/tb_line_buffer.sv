// tb_line_buffer: streams pixels with random pauses into a short line
// buffer and checks that each output column holds the pixels exactly one,
// two and three lines older than the pixel that produced it, one clock later.
module tb_line_buffer;
  localparam int DW = 8, W = 7, ROWS = 3, NPIX = 400;
  logic clk = 0, rst = 1;
  logic in_valid, out_valid;
  logic [DW-1:0] in_pix;
  logic [DW-1:0] out_col [ROWS];
  int stream [NPIX];
  int n_in = 0, n_out = 0, checks = 0, failures = 0, pauses = 0;
  bit pend;

  line_buffer #(.DW(DW), .IMG_W(W), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: the n-th output belongs to the n-th input pixel, one clock later
  always @(posedge clk) begin
    if (!rst && pend != out_valid) begin
      failures++;
      $display("out_valid %0b one clock after in_valid %0b", out_valid, pend);
    end
    if (!rst && out_valid) begin
      for (int k = 0; k < ROWS; k++) begin
        int src;
        src = n_out - (k + 1) * W;
        if (src >= 0) begin
          checks++;
          if (out_col[k] != DW'(stream[src])) begin
            failures++;
            $display("pixel %0d line %0d: got %0d expected %0d", n_out, k, out_col[k], stream[src]);
          end
        end
      end
      n_out++;
    end
    pend = in_valid && !rst;
  end

  initial begin
    foreach (stream[i]) stream[i] = int'($urandom % 256);
    in_valid = 0; in_pix = 0; pend = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    while (n_in < NPIX) begin
      @(negedge clk);
      if ($urandom % 4 == 0) begin
        in_valid = 0; pauses++;
      end else begin
        in_valid = 1; in_pix = DW'(stream[n_in]); n_in++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != NPIX) begin failures++; $display("outputs %0d of %0d", n_out, NPIX); end
    if (pauses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
