// tb_sobel_filter: two small random frames (with bright blocks to force
// saturation) streamed with random pauses. Every output must come LAT
// clocks after its input pixel; each output marked inside must equal the
// reference Sobel value of image pixel (x-1, y-2), and the number of inside
// outputs must be (H-3)*(W-2) per frame.
module tb_sobel_filter;
  import tb_golden_pkg::*;
  localparam int DW = 8, W = 12, H = 8, FRAMES = 2, LAT = 6;
  logic clk = 0, rst = 1;
  logic in_valid, out_valid, out_inside;
  logic [DW-1:0] in_pix, out_pix;
  img_t img [FRAMES];
  int in_t [$];
  int cyc = 0, n_in = 0, n_out = 0, n_inside = 0, checks = 0, failures = 0, pauses = 0;
  int special = 0;

  sobel_filter #(.DW(DW), .IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int golden(int f, int cx, int cy);
    return sobel_ref(img[f], W, cx, cy, 255);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      int f, x, y, t0;
      bit exp_in;
      f = n_out / (W*H); x = (n_out % (W*H)) % W; y = (n_out % (W*H)) / W;
      exp_in = (y >= 3) && (x >= 2);
      t0 = in_t.pop_front();
      checks++;
      if (cyc - t0 != LAT || out_inside != exp_in) begin
        failures++;
        $display("pixel %0d: latency %0d inside %0b", n_out, cyc - t0, out_inside);
      end
      if (exp_in) begin
        int e;
        e = golden(f, x-1, y-2);
        if (e == 255) special++;
        n_inside++;
        checks++;
        if (out_pix != DW'(e)) begin
          failures++;
          $display("frame %0d centre (%0d,%0d): got %0d expected %0d", f, x-1, y-2, out_pix, e);
        end
      end
      n_out++;
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[W*H];
      foreach (img[f][i]) img[f][i] = int'($urandom % 256);
      for (int y = 2; y < 5; y++)
        for (int x = 4; x < 8; x++) img[f][y*W + x] = (f == 0) ? 255 : 0;
    end
    in_valid = 0; in_pix = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    while (n_in < FRAMES*W*H) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        in_valid = 0; pauses++;
      end else begin
        in_valid = 1;
        in_pix = DW'(img[n_in / (W*H)][n_in % (W*H)]);
        in_t.push_back(cyc + 1);
        n_in++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != FRAMES*W*H || n_inside != FRAMES*(H-3)*(W-2)) begin
      failures++; $display("outputs %0d, inside %0d", n_out, n_inside);
    end
    if (pauses == 0 || special == 0) failures++;
    $display("pauses %0d, special results %0d", pauses, special);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
