// tb_window_buffer: random columns shifted in with random enables; the nine
// outputs are compared with a reference 3x3 array after every clock.
module tb_window_buffer;
  localparam int DW = 8, ROWS = 3, COLS = 3;
  logic clk = 0, shift;
  logic [DW-1:0] in_col [ROWS];
  logic [DW-1:0] win [ROWS*COLS];
  int model [ROWS][COLS];
  int checks = 0, failures = 0, holds = 0, shifts = 0;

  window_buffer #(.DW(DW), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 1;
    // fill the window
    for (int c = 0; c < COLS; c++) begin
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        in_col[r] = DW'($urandom);
        for (int k = COLS - 1; k > 0; k--) model[r][k] = model[r][k-1];
        model[r][0] = int'(in_col[r]);
      end
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (win[r*COLS + c] != DW'(model[r][c])) begin
            failures++;
            $display("t=%0d p%0d: got %0d expected %0d", t, r*COLS + c, win[r*COLS + c], model[r][c]);
          end
        end
      shift = 1'($urandom);
      if (shift) shifts++; else holds++;
      for (int r = 0; r < ROWS; r++) begin
        in_col[r] = DW'($urandom);
        if (shift) begin
          for (int k = COLS - 1; k > 0; k--) model[r][k] = model[r][k-1];
          model[r][0] = int'(in_col[r]);
        end
      end
    end
    if (holds == 0 || shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
