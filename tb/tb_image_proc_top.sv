// tb_image_proc_top: end-to-end run of the whole design on small frames.
//
// Gray-scale frames (random texture, a bright block that drives the Sobel
// result into saturation, long runs and a-b-a patterns for the histograms)
// are streamed with random pauses while a binary stream runs in parallel.
// After each frame both histograms are read out and compared with the
// reference counts; during readout pix_valid is held high so that the
// back-pressure (pix_ready low) is exercised and must not let pixels in.
// Every inside Sobel, Gaussian and closing output is compared with the
// reference computed from the frame, as is every halved pixel; the
// standalone units (bit reversal, multiply by six, multiplexers, register
// pair) are driven at the same time.
// Each mechanism is counted and must occur at least once: clearing sweep,
// stream pauses, back-pressure stalls, Sobel saturation, border (outside)
// outputs, equal neighbouring pixels, a-b-a patterns, histogram readout,
// pixels changed by the closing.
module tb_image_proc_top;
  import tb_golden_pkg::*;
  localparam int W = 16, H = 12, FRAMES = 2;
  localparam int DW = 8, CW = img_pkg::HIST_CW, BINS = 256;
  localparam longint WATCHDOG = 64'(FRAMES) * W * H * 3 + 20000;

  logic clk = 0, rst = 1;
  logic pix_valid, pix_ready, hist_data_ready, hist_busy;
  logic [DW-1:0] pix_in, sobel_pix, gauss_pix, hr_bin, ha_bin;
  logic sobel_valid, sobel_inside, gauss_valid, gauss_inside;
  logic hr_valid, hr_last, ha_valid, ha_last;
  logic [CW-1:0] hr_count, ha_count;
  logic bin_valid, bin_in, close_valid, close_inside, close_pix;
  logic rev_load;
  logic [7:0] rev_in, rev_a, rev_out;
  logic [3:0] m6_a;
  logic [6:0] m6_y;
  logic [2:0] mux_in;
  logic [1:0] mux_sel;
  logic mux_out, chain_d, chain_q1, chain_q2;
  logic half_valid;
  logic [DW-1:0] half_pix;
  logic [1:0] mux2_in;
  logic mux2_sel, mux2_out;

  image_proc_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  img_t gimg [FRAMES];
  img_t bimg [FRAMES];
  img_t bdil [FRAMES];
  int checks = 0, failures = 0;
  int n_sobel = 0, n_gauss = 0, n_close = 0, n_half = 0;
  int m_clear = 0, m_pause = 0, m_stall = 0, m_sat = 0, m_border = 0, m_equal = 0;
  int m_aba = 0, m_readout = 0, m_filled = 0;
  bit bin_done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // output checkers: the k-th output of a stream belongs to its k-th input
  always @(posedge clk) if (!rst) begin
    if (sobel_valid) begin
      int f, x, y;
      f = n_sobel / (W*H); x = (n_sobel % (W*H)) % W; y = (n_sobel % (W*H)) / W;
      check(sobel_inside == (y >= 3 && x >= 2), "sobel inside flag");
      if (y >= 3 && x >= 2) begin
        int e;
        e = sobel_ref(gimg[f], W, x-1, y-2, 255);
        if (e == 255) m_sat++;
        check(sobel_pix == DW'(e), $sformatf("sobel f%0d (%0d,%0d) got %0d exp %0d", f, x-1, y-2, sobel_pix, e));
      end else m_border++;
      n_sobel++;
    end
    if (gauss_valid) begin
      int f, x, y;
      f = n_gauss / (W*H); x = (n_gauss % (W*H)) % W; y = (n_gauss % (W*H)) / W;
      check(gauss_inside == (y >= 3 && x >= 2), "gauss inside flag");
      if (y >= 3 && x >= 2) begin
        int e;
        e = gauss_ref(gimg[f], W, x-1, y-2);
        check(gauss_pix == DW'(e), $sformatf("gauss f%0d (%0d,%0d) got %0d exp %0d", f, x-1, y-2, gauss_pix, e));
      end
      n_gauss++;
    end
    if (half_valid) begin
      int f, i;
      f = n_half / (W*H); i = n_half % (W*H);
      check(half_pix == DW'(gimg[f][i] / 2), "pixel halving");
      n_half++;
    end
    if (close_valid) begin
      int f, x, y;
      f = n_close / (W*H); x = (n_close % (W*H)) % W; y = (n_close % (W*H)) / W;
      check(close_inside == (y >= 6 && x >= 4), "closing inside flag");
      if (y >= 6 && x >= 4) begin
        int e;
        e = cross_ref(bdil[f], W, x-2, y-4, 1'b0);
        if (e != px(bimg[f], W, x-2, y-4)) m_filled++;
        check(close_pix == e[0], $sformatf("closing f%0d (%0d,%0d)", f, x-2, y-4));
      end
      n_close++;
    end
  end

  // standalone units, driven from their own process
  initial begin
    logic [7:0] r;
    rev_load = 0; rev_in = 0; m6_a = 0; mux_in = 0; mux_sel = 0; chain_d = 0;
    mux2_in = 0; mux2_sel = 0;
    @(negedge clk);
    for (int t = 0; t < 64; t++) begin
      rev_load = 1; rev_in = 8'($urandom);
      m6_a = 4'(t); mux_in = 3'($urandom); mux_sel = 2'(t);
      mux2_in = 2'($urandom); mux2_sel = 1'($urandom);
      chain_d = 1;
      #1;
      check(int'(m6_y) == 6 * (t % 16), "mul6");
      check(mux_out == ((mux_sel == 3) ? 1'b0 : mux_in[mux_sel]), "mux3");
      check(mux2_out == mux2_in[mux2_sel], "mux2");
      @(negedge clk);
      rev_load = 0;
      for (int i = 0; i < 8; i++) r[i] = rev_in[7-i];
      @(negedge clk);
      check(rev_a == rev_in && rev_out == r, "bit reversal");
      check(chain_q1 == 1'b1 && chain_q2 == 1'b1, "register pair");
      chain_d = 0;
      @(negedge clk);
      check(chain_q1 == 1'b0 && chain_q2 == 1'b1, "register pair delay");
    end
  end

  // binary stream
  initial begin
    int n = 0;
    bin_valid = 0; bin_in = 0;
    wait (!rst);
    while (n < FRAMES*W*H) begin
      @(negedge clk);
      if ($urandom % 4 == 0) bin_valid = 0;
      else begin
        bin_valid = 1; bin_in = bimg[n / (W*H)][n % (W*H)][0]; n++;
      end
    end
    @(negedge clk); bin_valid = 0;
    bin_done = 1;
  end

  // gray stream and histogram readout
  initial begin
    int ref_cnt [BINS];
    for (int f = 0; f < FRAMES; f++) begin
      gimg[f] = new[W*H]; bimg[f] = new[W*H]; bdil[f] = new[W*H];
      for (int i = 0; i < W*H; i++) begin
        int x, y;
        x = i % W; y = i / W;
        if (y >= 2 && y < 5 && x >= 4 && x < 9) gimg[f][i] = 250;        // bright block
        else if (y == H-2)                      gimg[f][i] = 77;         // a run
        else if (y == H-1)                      gimg[f][i] = (x % 2) ? 12 : 200; // a-b-a
        else                                    gimg[f][i] = int'($urandom % 256);
        bimg[f][i] = ($urandom % 100 < 40) ? 1 : 0;
        bdil[f][i] = 0;
      end
      for (int y = 1; y < H-1; y++)
        for (int x = 1; x < W-1; x++) bdil[f][y*W + x] = cross_ref(bimg[f], W, x, y, 1'b1);
    end
    pix_valid = 0; pix_in = 0; hist_data_ready = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    while (hist_busy) begin
      m_clear++;
      check(!pix_ready, "not ready while clearing");
      @(negedge clk);
    end
    check(m_clear == BINS - 1, $sformatf("clearing took %0d clocks", m_clear + 1));
    for (int f = 0; f < FRAMES; f++) begin
      int prev1 = -1, prev2 = -1;
      foreach (ref_cnt[i]) ref_cnt[i] = 0;
      for (int i = 0; i < W*H; i++) begin
        int p;
        p = gimg[f][i];
        if ($urandom % 5 == 0) begin
          pix_valid = 0; m_pause++;
          @(negedge clk);
        end
        check(pix_ready, "ready while streaming");
        pix_valid = 1; pix_in = DW'(p);
        if (p == prev1) m_equal++;
        if (p == prev2 && p != prev1) m_aba++;
        prev2 = prev1; prev1 = p;
        ref_cnt[p]++;
        @(negedge clk);
      end
      // readout; keep offering a pixel that must not be taken
      pix_valid = 1; pix_in = 8'd1;
      hist_data_ready = 1;
      @(negedge clk);
      for (int b = 0; b < BINS; b++) begin
        if (!pix_ready) m_stall++;
        if (b == BINS - 1) begin
          hist_data_ready = 0;
          pix_valid = 0;
        end
        check(hr_valid && hr_bin == DW'(b) && hr_count == CW'(ref_cnt[b]) && hr_last == (b == BINS-1),
              $sformatf("histogram_rtl f%0d bin %0d got %0d exp %0d", f, b, hr_count, ref_cnt[b]));
        check(ha_valid && ha_bin == DW'(b) && ha_count == CW'(ref_cnt[b]) && ha_last == (b == BINS-1),
              $sformatf("histogram_acc f%0d bin %0d got %0d exp %0d", f, b, ha_count, ref_cnt[b]));
        @(negedge clk);
      end
      pix_valid = 0;
      m_readout++;
    end
    wait (bin_done);
    repeat (10) @(negedge clk);
    check(n_sobel == FRAMES*W*H && n_gauss == FRAMES*W*H && n_close == FRAMES*W*H && n_half == FRAMES*W*H,
          $sformatf("output counts %0d %0d %0d %0d", n_sobel, n_gauss, n_close, n_half));
    $display("clearing %0d, pauses %0d, stalls %0d, saturated %0d, border %0d, equal %0d, a-b-a %0d, readouts %0d, closing changes %0d",
             m_clear, m_pause, m_stall, m_sat, m_border, m_equal, m_aba, m_readout, m_filled);
    check(m_clear > 0, "clearing happened");
    check(m_pause > 0, "pauses happened");
    check(m_stall > 0, "stalls happened");
    check(m_sat > 0, "Sobel saturation happened");
    check(m_border > 0, "border outputs happened");
    check(m_equal > 0, "equal neighbours happened");
    check(m_aba > 0, "a-b-a patterns happened");
    check(m_readout > 0, "readout happened");
    check(m_filled > 0, "closing changed pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
