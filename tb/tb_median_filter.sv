// tb_median_filter: self-checking testbench of the median core.
//
// Frames of random size (including the smallest, 3 x 3) with random pixels,
// salted with 0 and 255 impulses, are streamed through the core with random
// gaps on the input and random back-pressure on the output. Every result is
// compared with the reference model in tb_ref_pkg, the result count must be
// (w-2) x (h-2), and out_last must mark exactly the final result. One frame
// without stalls checks the rate: one pixel per cycle, the last result
// leaving two cycles after the last pixel.
module tb_median_filter;
  import prtr_pkg::*;
  import tb_ref_pkg::*;

  localparam int W_MAX = 64;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        start = 1'b0;
  logic [15:0] width = '0, height = '0;
  logic        in_valid = 1'b0, in_ready;
  pixel_t      in_pix = '0;
  logic        out_valid, out_ready = 1'b0, out_last;
  pixel_t      out_pix;
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end

  median_filter #(.IMG_W_MAX(W_MAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame(input int w, input int h, input int gap_pct, input int stall_pct,
                           output int cycles);
    byte unsigned img[];
    byte unsigned exp_q[$];
    int n_out = 0, n_last = 0, t0, t_last;
    img = new[w*h];
    foreach (img[i]) begin
      case ($urandom_range(9))
        0:       img[i] = 8'd0;
        1:       img[i] = 8'd255;
        default: img[i] = byte'($urandom);
      endcase
    end
    ref_image(1, img, w, h, exp_q);
    @(negedge clk);
    width = 16'(w); height = 16'(h);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = $time / 10;
    t_last = t0;
    fork
      begin : drive
        for (int i = 0; i < w*h; ) begin
          in_valid = ($urandom_range(99) >= gap_pct);
          in_pix   = img[i];
          @(posedge clk);
          if (in_valid && in_ready) i++;
          #1;
        end
        in_valid = 1'b0;
      end
      begin : sink
        while (n_out < exp_q.size() || exp_q.size() == 0) begin
          out_ready = ($urandom_range(99) >= stall_pct);
          @(posedge clk);
          if (out_valid && out_ready) begin
            check(out_pix == exp_q[n_out], $sformatf("w=%0d h=%0d result %0d: got %0d expected %0d",
                  w, h, n_out, out_pix, exp_q[n_out]));
            if (out_last) n_last++;
            check(out_last == (n_out == exp_q.size() - 1), $sformatf("out_last at result %0d", n_out));
            n_out++;
            t_last = $time / 10;
          end
          if (exp_q.size() == 0) break;
          #1;
        end
        out_ready = 1'b0;
      end
    join
    repeat (3) @(posedge clk);
    check(!out_valid, "no result after the last one");
    check(n_last == 1, $sformatf("exactly one out_last (saw %0d)", n_last));
    check(n_out == (w-2)*(h-2), $sformatf("result count %0d for %0dx%0d", n_out, w, h));
    cycles = t_last - t0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_frame(3, 3, 0, 0, cyc);
    run_frame(W_MAX, 5, 20, 20, cyc);
    for (int k = 0; k < 12; k++)
      run_frame($urandom_range(3, 24), $urandom_range(3, 12), $urandom_range(0, 50),
                $urandom_range(0, 50), cyc);
    // rate: w*h pixels, one per cycle, last result two cycles after the last pixel
    run_frame(20, 10, 0, 0, cyc);
    check(cyc == 20*10 + 1, $sformatf("unstalled 20x10 frame took %0d cycles, expected %0d", cyc, 20*10 + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
