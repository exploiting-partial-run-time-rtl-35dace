// tb_pr_ctrl_regs: self-checking testbench of the PR control registers.
//
// A small model of the configuration domain (period 30) answers each start
// toggle, after a random delay, with a done toggle and a cycle count. Checks:
// length write and its lock while busy, one start toggle per accepted start,
// start ignored while busy, busy/done sequencing, the captured cycle count,
// done clear, and the status word layout.
module tb_pr_ctrl_regs;
  logic        clk = 1'b0, clk_i = 1'b0, rst_n = 1'b1;
  logic        ctrl_we = 1'b0, length_we = 1'b0;
  logic [31:0] wdata = '0, cycles_icap = '0, length_q, status_q, cycles_q;
  logic [11:0] free_words = 12'd321;
  logic        done_toggle_icap = 1'b0, start_toggle, busy, done;
  int          checks = 0, failures = 0;

  always #5  clk = !clk;
  always #15 clk_i = !clk_i;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end

  pr_ctrl_regs dut (.*);

  // configuration-domain responder
  initial begin
    logic seen = 1'b0;
    forever begin
      @(posedge clk_i);
      if (start_toggle != seen) begin
        seen = start_toggle;
        repeat ($urandom_range(3, 40)) @(posedge clk_i);
        cycles_icap <= $urandom;
        @(posedge clk_i);
        done_toggle_icap <= !done_toggle_icap;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic c, input logic l, input logic [31:0] d);
    @(negedge clk);
    ctrl_we = c; length_we = l; wdata = d;
    @(negedge clk);
    ctrl_we = 1'b0; length_we = 1'b0;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic st;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    for (int n = 0; n < 20; n++) begin
      int len = $urandom_range(1, 100000);
      write(1'b0, 1'b1, len);
      check(length_q == len, "length written");
      st = start_toggle;
      write(1'b1, 1'b0, 32'h1);
      check(start_toggle != st, "start toggled");
      check(busy && !done, "busy after start");
      check(status_q == {4'b0, 12'd321, 14'b0, 1'b0, 1'b1}, "status word while busy");
      write(1'b0, 1'b1, 32'hDEAD);
      check(length_q == len, "length locked while busy");
      st = start_toggle;
      write(1'b1, 1'b0, 32'h1);
      check(start_toggle == st, "start ignored while busy");
      while (!done) @(negedge clk);
      check(!busy, "busy dropped with done");
      check(cycles_q == cycles_icap, "cycle count captured");
      if (n % 2 == 0) begin
        write(1'b1, 1'b0, 32'h2);
        check(!done, "done cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
