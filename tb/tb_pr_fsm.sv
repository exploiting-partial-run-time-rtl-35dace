// tb_pr_fsm: self-checking testbench of the PR state machine.
//
// A queue stands in for the bitstream buffer (one-cycle read latency, random
// empty periods). The bytes strobed into the ICAP port must be exactly the
// first `length` bytes, in order; done_toggle must flip once per
// configuration; with data always available the state machine must write one
// byte per cycle, so a configuration of L bytes takes L + 1 counted cycles.
module tb_pr_fsm;
  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [31:0] length = '0;
  logic        buf_empty, buf_rd_en, buf_valid = 1'b0;
  logic [7:0]  buf_data = '0;
  logic        icap_ce_n, icap_write_n, busy, done_toggle;
  logic [7:0]  icap_i;
  logic [31:0] cycles;
  int          checks = 0, failures = 0;
  byte unsigned src[$], got[$];
  bit          starve = 1'b0;

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end

  pr_fsm dut (.*);

  assign buf_empty = (src.size() == 0) || starve;

  always @(posedge clk) begin
    buf_valid <= buf_rd_en;
    if (buf_rd_en) buf_data <= src.pop_front();
    if (!icap_ce_n && !icap_write_n) got.push_back(icap_i);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int len, input int extra, input bit random_starve);
    byte unsigned exp_q[$];
    logic t0;
    src = {}; got = {};
    for (int i = 0; i < len + extra; i++) src.push_back(byte'($urandom));
    exp_q = src[0:len-1];
    t0 = done_toggle;
    @(negedge clk);
    length = len; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      starve = random_starve && ($urandom_range(2) == 0);
      @(negedge clk);
    end
    starve = 1'b0;
    repeat (3) @(negedge clk);
    check(done_toggle != t0, "done_toggle flipped");
    check(got.size() == len, $sformatf("ICAP received %0d bytes, expected %0d", got.size(), len));
    for (int i = 0; i < len && i < got.size(); i++)
      check(got[i] == exp_q[i], $sformatf("ICAP byte %0d", i));
    check(src.size() == extra, "no byte read beyond length");
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
    run(100, 5, 1'b1);
    run(1, 3, 1'b0);
    run(1000, 0, 1'b0);
    check(cycles == 1001, $sformatf("1000 bytes took %0d cycles, expected 1001", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
