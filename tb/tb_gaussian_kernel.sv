// tb_gaussian_kernel: random and extreme 3x3 windows, one per clock with random
// gaps; each result must appear exactly 2 clocks later and equal the
// sum of the window pixels each divided by its power-of-two weight, worked
// out here; it must also lie within 8 below the exact (sum*mask)/16.
module tb_gaussian_kernel;
  localparam int DW = 8, LAT = 2, N = 3000;
  logic clk = 0, rst = 1;
  logic in_valid, in_inside, out_valid, out_inside;
  logic [DW-1:0] win [9];
  logic [DW-1:0] out_pix;
  int exp_pix [$], exp_ins [$], exp_t [$];
  int cyc = 0, checks = 0, failures = 0, saturated = 0, plain = 0;

  gaussian_kernel #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_gauss(input int w [9]);
    return (w[0] >> 4) + (w[1] >> 3) + (w[2] >> 4) + (w[3] >> 3) + (w[4] >> 2)
         + (w[5] >> 3) + (w[6] >> 4) + (w[7] >> 3) + (w[8] >> 4);
  endfunction

  function automatic int exact_gauss(input int w [9]);
    return (w[0] + 2*w[1] + w[2] + 2*w[3] + 4*w[4] + 2*w[5] + w[6] + 2*w[7] + w[8]) / 16;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      checks++;
      if (exp_pix.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        int e, ei, et;
        e = exp_pix.pop_front(); ei = exp_ins.pop_front(); et = exp_t.pop_front();
        if (out_pix != DW'(e) || out_inside != ei[0] || cyc - et != LAT) begin
          failures++;
          $display("got %0d/%0b after %0d, expected %0d/%0b after %0d", out_pix, out_inside, cyc - et, e, ei, LAT);
        end
      end
    end
  end

  initial begin
    int w [9];
    in_valid = 0; in_inside = 0;
    foreach (win[i]) win[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid  = ($urandom % 5 != 0);
      in_inside = 1'($urandom);
      for (int i = 0; i < 9; i++) begin
        case (n % 4)
          0: w[i] = int'($urandom % 256);
          1: w[i] = int'($urandom % 16);        // flat area, small gradient
          2: w[i] = (i % 3 == 0) ? 255 : 0;      // strong vertical edge
          default: w[i] = ($urandom % 2) ? 255 : int'($urandom % 256);
        endcase
        win[i] = DW'(w[i]);
      end
      if (in_valid) begin
        int e;
        e = ref_gauss(w);
        if (exact_gauss(w) - e > 8 || e > exact_gauss(w)) begin
          failures++; $display("reference %0d exact %0d", e, exact_gauss(w));
        end
        if (e >= 240) saturated++; else plain++;
        exp_pix.push_back(e); exp_ins.push_back(int'(in_inside)); exp_t.push_back(cyc + 1);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_pix.size() != 0) begin failures++; $display("%0d results missing", exp_pix.size()); end
    if (saturated == 0 || plain == 0) failures++;
    $display("near-white %0d, other %0d", saturated, plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
