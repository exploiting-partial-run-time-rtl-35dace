// tb_window3x3: self-checking testbench of the 3x3 window generator.
//
// Random frames are fed with random gaps and random stalls (en low). For
// every valid window all nine pixels are compared with the input image at
// rows y-2..y and columns x-2..x of the pixel that completed it; windows
// must come out in raster order, (w-2) x (h-2) of them, win_last only on the
// final one. clear must restart the coordinates between frames.
module tb_window3x3;
  import prtr_pkg::*;

  localparam int W_MAX = 32;

  logic        clk = 1'b0, rst_n = 1'b1, clear = 1'b0;
  logic [15:0] width = '0, height = '0;
  logic        en = 1'b0, in_valid = 1'b0;
  pixel_t      in_pix = '0;
  logic        win_valid, win_last;
  pixel_t      win [3][3];
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end

  window3x3 #(.IMG_W_MAX(W_MAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic frame(input int w, input int h);
    byte unsigned img[];
    int i = 0, k = 0, cx, cy, lasts = 0;
    img = new[w*h];
    foreach (img[j]) img[j] = byte'($urandom);
    @(negedge clk);
    width = 16'(w); height = 16'(h); clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    // at each falling edge: choose this cycle's inputs; a valid window is
    // consumed at the next rising edge if en is high
    while (k < (w-2)*(h-2)) begin
      en       = ($urandom_range(3) != 0);
      in_valid = (i < w*h) && ($urandom_range(3) != 0);
      in_pix   = (i < w*h) ? img[i] : 8'h00;
      if (win_valid && en) begin
        cx = 1 + k % (w-2);
        cy = 1 + k / (w-2);
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            check(win[r][c] == img[(cy-1+r)*w + cx-1+c],
                  $sformatf("w=%0d window %0d [%0d][%0d]", w, k, r, c));
        if (win_last) lasts++;
        check(win_last == (k == (w-2)*(h-2) - 1), $sformatf("win_last at window %0d", k));
        k++;
      end
      @(posedge clk);
      if (en && in_valid) i++;
      @(negedge clk);
    end
    en = 1'b0;
    in_valid = 1'b0;
    check(lasts == 1, "one win_last per frame");
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    frame(3, 3);
    frame(W_MAX, 4);
    for (int n = 0; n < 10; n++) frame($urandom_range(3, W_MAX), $urandom_range(3, 8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
