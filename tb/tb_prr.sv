// tb_prr: self-checking testbench of a partially reconfigurable region.
//
// The configuration plane is driven directly (cfg_loading, cfg_func). Checks:
// a blank region accepts nothing; the reported function changes only when
// loading ends; while loading, the region's ports are quiet even if a frame
// was in progress; after each configuration a frame through the region
// matches the reference model of the loaded function.
module tb_prr;
  import prtr_pkg::*;
  import tb_ref_pkg::*;
  localparam int W_MAX = 32;
  logic        clk = 1'b0, rst_n = 1'b1, cfg_loading = 1'b0, loading;
  func_t       cfg_func = FN_BLANK, func;
  logic        start = 1'b0, in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_last;
  logic [15:0] width = '0, height = '0;
  pixel_t      in_pix = '0, out_pix;
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end
  prr #(.IMG_W_MAX(W_MAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic reconfigure(input func_t f, input bit during_frame);
    @(negedge clk);
    cfg_loading = 1'b1;
    repeat (4) @(negedge clk);
    check(loading, "loading seen");
    check(func == FN_BLANK, "function blank while loading");
    cfg_func = f;
    for (int i = 0; i < 20; i++) begin
      in_valid = during_frame;
      check(!in_ready && !out_valid, "ports quiet while loading");
      @(negedge clk);
    end
    in_valid = 1'b0;
    cfg_loading = 1'b0;
    repeat (5) @(negedge clk);
    check(!loading && func == f, $sformatf("function %0d after loading", f));
  endtask

  task automatic frame(input int fn, input int w, input int h);
    byte unsigned img[];
    byte unsigned exp_q[$];
    int n = 0, i = 0;
    img = new[w*h];
    foreach (img[k]) img[k] = byte'($urandom);
    ref_image(fn, img, w, h, exp_q);
    @(negedge clk);
    width = 16'(w); height = 16'(h); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (n < exp_q.size()) begin
      in_valid  = (i < w*h) && $urandom_range(3) != 0;
      in_pix    = (i < w*h) ? img[i] : 8'h0;
      out_ready = $urandom_range(3) != 0;
      @(posedge clk);
      if (in_valid && in_ready) i++;
      if (out_valid && out_ready) begin
        check(out_pix == exp_q[n], $sformatf("fn %0d result %0d", fn, n));
        check(out_last == (n == exp_q.size() - 1), "out_last");
        n++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    out_ready = 1'b1;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b1;
    repeat (3) @(negedge clk);
    check(func == FN_BLANK && !in_ready, "blank region accepts nothing");
    in_valid = 1'b0;
    reconfigure(FN_MEDIAN, 1'b0);
    frame(1, 12, 7);
    reconfigure(FN_SOBEL, 1'b1);
    frame(2, 20, 6);
    reconfigure(FN_SMOOTH, 1'b0);
    frame(3, 9, 9);
    reconfigure(FN_MEDIAN, 1'b1);
    frame(1, W_MAX, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
