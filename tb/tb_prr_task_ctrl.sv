// tb_prr_task_ctrl: self-checking testbench of a PRR's task registers.
//
// Checks register write/read-back, the derived pixel counts, refusal of a
// start while the region is blank or loading (error bit, no task_start), one
// task_start per accepted start, busy until writer_done, done and the cycle
// count of the task, and that registers are locked while busy.
module tb_prr_task_ctrl;
  import prtr_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1, sel = 1'b0, wr = 1'b0, rd = 1'b0;
  logic [11:0] addr = '0;
  logic [31:0] wdata = '0, rdata, in_count, out_count;
  logic        rvalid, done_irq, loading = 1'b0, task_start, writer_done = 1'b0;
  func_t       func = FN_BLANK;
  logic [15:0] width, height;
  logic [21:0] src_base, dst_base;
  int          checks = 0, failures = 0, starts = 0;

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end
  prr_task_ctrl #(.AW(22)) dut (.*);
  always @(posedge clk) if (task_start) starts++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic hwrite(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    sel = 1'b1; wr = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    sel = 1'b0; wr = 1'b0;
  endtask

  task automatic hread(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    sel = 1'b1; rd = 1'b1; addr = a;
    @(negedge clk);
    sel = 1'b0; rd = 1'b0;
    d = rdata;
    check(rvalid, "read answered");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    hwrite(TK_WIDTH, 640); hwrite(TK_HEIGHT, 480);
    hwrite(TK_SRC, 32'h1000); hwrite(TK_DST, 32'h2_0000);
    hread(TK_WIDTH, r);  check(r == 640, "width");
    hread(TK_HEIGHT, r); check(r == 480, "height");
    hread(TK_SRC, r);    check(r == 32'h1000, "src");
    hread(TK_DST, r);    check(r == 32'h2_0000, "dst");
    check(in_count == 640*480 && out_count == 638*478, "pixel counts");
    // blank region: refused
    hwrite(TK_CTRL, 1);
    hread(TK_STATUS, r);
    check(r[3] && !r[0] && starts == 0, "start refused on a blank region");
    func = FN_SOBEL; loading = 1'b1;
    hwrite(TK_CTRL, 3);
    hread(TK_STATUS, r);
    check(r[3] && r[2] && starts == 0, "start refused while loading");
    loading = 1'b0;
    hwrite(TK_CTRL, 2);
    for (int t = 0; t < 3; t++) begin
      int len = $urandom_range(5, 60);
      hwrite(TK_CTRL, 1);
      hread(TK_STATUS, r);
      check(r[0] && !r[1] && r[11:8] == 4'(FN_SOBEL), "busy with function shown");
      check(starts == t + 1, "one task_start");
      hwrite(TK_WIDTH, 99);
      hread(TK_WIDTH, r); check(r == 640, "width locked while busy");
      // from the start edge: 7 cycles of register traffic plus len
      repeat (len) @(negedge clk);
      writer_done = 1'b1;
      @(negedge clk);
      writer_done = 1'b0;
      hread(TK_STATUS, r);
      check(!r[0] && r[1] && done_irq, "done after writer_done");
      hread(TK_CYCLES, r);
      check(r == 32'(len + 7), $sformatf("task cycles %0d, expected %0d", r, len + 7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
