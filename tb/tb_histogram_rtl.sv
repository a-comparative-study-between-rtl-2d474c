// tb_histogram_rtl: after the clearing sweep (BINS clocks of busy), two
// frames of pixels with long runs of equal values, a-b-a patterns, random
// values and pauses are counted, one pixel per clock when not paused; each
// frame is then read out. Every bin must hold the reference count
// (saturated at 2^CW-1), in bin order, starting one clock after
// data_ready rises, with out_last on the final bin. The second frame checks
// that readout left the memory empty.
module tb_histogram_rtl;
  localparam int BINS = 16, CW = 7, AW = $clog2(BINS), NPIX = 600, FRAMES = 2;
  localparam int MAXC = 2**CW - 1;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, data_ready, busy, out_valid, out_last;
  logic [AW-1:0] in_pix, out_bin;
  logic [CW-1:0] out_count;
  int ref_cnt [BINS];
  int checks = 0, failures = 0, busy_cycles = 0;
  int n_equal = 0, n_aba = 0, n_sat = 0, n_pause = 0;

  histogram_rtl #(.BINS(BINS), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, p1, p2, bin_exp;
    in_valid = 0; in_pix = 0; data_ready = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    while (busy) begin
      if (in_ready) begin failures++; $display("ready while clearing"); end
      busy_cycles++;
      @(negedge clk);
    end
    checks++;
    if (busy_cycles != BINS) begin failures++; $display("cleared in %0d clocks", busy_cycles); end
    for (int f = 0; f < FRAMES; f++) begin
      foreach (ref_cnt[i]) ref_cnt[i] = 0;
      p1 = -1; p2 = -1;
      for (int n = 0; n < NPIX; n++) begin
        int mode;
        mode = (n / 50) % 4;
        case (mode)
          0: p = int'($urandom % BINS);
          1: p = (n % 2 == 0) ? 5 : 9;                              // a-b-a-b
          2: p = int'($urandom % 3);                                // short runs
          default: p = int'($urandom % BINS);
        endcase
        if (f == 0 && n < 150) p = 3;                             // long run, saturates
        if ($urandom % 6 == 0) begin
          in_valid = 0; n_pause++;
          @(negedge clk);
        end
        if (!in_ready) begin failures++; $display("not ready while counting"); end
        in_valid = 1; in_pix = AW'(p);
        if (p == p1) n_equal++;
        if (p == p2 && p != p1) n_aba++;
        p2 = p1; p1 = p;
        ref_cnt[p]++;
        @(negedge clk);
      end
      in_valid = 0;
      // readout
      data_ready = 1;
      bin_exp = 0;
      @(negedge clk);
      for (int b = 0; b < BINS; b++) begin
        int e;
        e = ref_cnt[b] > MAXC ? MAXC : ref_cnt[b];
        if (ref_cnt[b] > MAXC) n_sat++;
        if (b == BINS - 1) data_ready = 0;
        checks++;
        if (!out_valid || out_bin != AW'(b) || out_count != CW'(e) || out_last != (b == BINS - 1)) begin
          failures++;
          $display("frame %0d bin %0d: valid %0b bin %0d count %0d last %0b, expected %0d", f, b,
                   out_valid, out_bin, out_count, out_last, e);
        end
        @(negedge clk);
      end
      checks++;
      if (out_valid) begin failures++; $display("readout did not stop"); end
    end
    if (n_equal == 0 || n_aba == 0 || n_sat == 0 || n_pause == 0) failures++;
    $display("equal neighbours %0d, a-b-a %0d, saturated bins %0d, pauses %0d",
             n_equal, n_aba, n_sat, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
