// tb_morph_closing: two random binary frames with pauses. Each output marked
// inside must equal the closing (cross dilation, then cross erosion) of
// image pixel (x-2, y-4), computed here from the image; outputs come 4
// clocks after their input pixel, (H-6)*(W-4) per frame are inside, and the
// closing must change some pixels (fill holes) for the test to count.
module tb_morph_closing;
  import tb_golden_pkg::*;
  localparam int W = 12, H = 12, FRAMES = 2, LAT = 4;
  logic clk = 0, rst = 1;
  logic in_valid, in_pix, out_valid, out_inside, out_pix;
  img_t img [FRAMES];
  img_t dil [FRAMES];
  int in_t [$];
  int cyc = 0, n_in = 0, n_out = 0, n_inside = 0, checks = 0, failures = 0, pauses = 0;
  int filled = 0;

  morph_closing #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      int f, x, y, t0;
      bit exp_in;
      f = n_out / (W*H); x = (n_out % (W*H)) % W; y = (n_out % (W*H)) / W;
      exp_in = (y >= 6) && (x >= 4);
      t0 = in_t.pop_front();
      checks++;
      if (cyc - t0 != LAT || out_inside != exp_in) begin
        failures++;
        $display("pixel %0d: latency %0d inside %0b", n_out, cyc - t0, out_inside);
      end
      if (exp_in) begin
        int e;
        e = cross_ref(dil[f], W, x-2, y-4, 1'b0);
        if (e != px(img[f], W, x-2, y-4)) filled++;
        n_inside++;
        checks++;
        if (out_pix != e[0]) begin
          failures++;
          $display("frame %0d centre (%0d,%0d): got %0d expected %0d", f, x-2, y-4, out_pix, e);
        end
      end
      n_out++;
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[W*H];
      dil[f] = new[W*H];
      foreach (img[f][i]) img[f][i] = ($urandom % 100 < 40) ? 1 : 0;
      foreach (dil[f][i]) dil[f][i] = 0;
      for (int y = 1; y < H-1; y++)
        for (int x = 1; x < W-1; x++) dil[f][y*W + x] = cross_ref(img[f], W, x, y, 1'b1);
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
        in_pix = img[n_in / (W*H)][n_in % (W*H)][0];
        in_t.push_back(cyc + 1);
        n_in++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != FRAMES*W*H || n_inside != FRAMES*(H-6)*(W-4)) begin
      failures++; $display("outputs %0d, inside %0d", n_out, n_inside);
    end
    if (pauses == 0 || filled == 0) failures++;
    $display("pauses %0d, pixels changed by closing %0d", pauses, filled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
