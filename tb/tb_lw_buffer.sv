// tb_lw_buffer: two small frames with random pauses. For every window the
// buffer marks as inside, all nine pixels are compared with the image
// (window row r, column c = image row y-1-r, column x-c for input pixel
// (x, y)); the inside flag itself and the 2-clock latency are checked too.
module tb_lw_buffer;
  import tb_golden_pkg::*;
  localparam int DW = 8, W = 8, H = 6, FRAMES = 2, NPIX = W*H*FRAMES;
  logic clk = 0, rst = 1;
  logic in_valid, win_valid, win_inside;
  logic [DW-1:0] in_pix;
  logic [DW-1:0] win [9];
  int stream [NPIX];
  int n_in = 0, n_out = 0, n_inside = 0, checks = 0, failures = 0, pauses = 0;
  logic [1:0] vpipe;

  lw_buffer #(.DW(DW), .IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (win_valid != vpipe[1]) begin
        failures++; $display("win_valid not two clocks after in_valid");
      end
      if (win_valid) begin
        int f, x, y;
        bit exp_in;
        f = n_out / (W*H); x = (n_out % (W*H)) % W; y = (n_out % (W*H)) / W;
        exp_in = (y >= 3) && (x >= 2);
        checks++;
        if (win_inside != exp_in) begin
          failures++; $display("pixel (%0d,%0d): inside %0b expected %0b", x, y, win_inside, exp_in);
        end
        if (exp_in) begin
          n_inside++;
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++) begin
              int e;
              e = stream[f*W*H + (y-1-r)*W + (x-c)];
              checks++;
              if (win[r*3+c] != DW'(e)) begin
                failures++;
                $display("(%0d,%0d) p%0d: got %0d expected %0d", x, y, r*3+c, win[r*3+c], e);
              end
            end
        end
        n_out++;
      end
    end
    vpipe <= rst ? 2'b00 : {vpipe[0], in_valid};
  end

  initial begin
    foreach (stream[i]) stream[i] = int'($urandom % 256);
    in_valid = 0; in_pix = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    while (n_in < NPIX) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        in_valid = 0; pauses++;
      end else begin
        in_valid = 1; in_pix = DW'(stream[n_in]); n_in++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_inside != FRAMES*(H-3)*(W-2)) begin
      failures++; $display("inside windows %0d", n_inside);
    end
    if (pauses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
