// tb_pr_controller: self-checking testbench of the partial-reconfiguration
// control unit with an ICAP model attached.
//
// The host side (period 10) writes LENGTH, starts, and streams bitstreams of
// several kilobytes, larger than the 2 KB buffer, as 32-bit words, writing
// only when STATUS reports free words. The ICAP side runs at period 30. The
// bytes reaching the ICAP port must equal the bitstream; the ICAP model must
// end with the requested function in the target region; done must be
// reported; CYCLES must be at least the byte count (one byte per ICAP clock
// at most) and, when the host keeps the buffer filled, close to it.
module tb_pr_controller;
  import prtr_pkg::*;
  import tb_ref_pkg::*;
  logic        clk = 1'b0, clk_icap = 1'b0, rst_n = 1'b1, rst_icap_n = 1'b1;
  logic        sel = 1'b0, wr = 1'b0, rd = 1'b0, rvalid, done;
  logic [11:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic        icap_ce_n, icap_write_n, icap_busy;
  logic [7:0]  icap_i, icap_o;
  logic [1:0]  cfg_loading;
  func_t       cfg_func [2];
  int          checks = 0, failures = 0;
  byte unsigned got[$];

  always #5  clk = !clk;
  always #15 clk_icap = !clk_icap;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
    rst_icap_n = 1'b0;
  end

  pr_controller #(.BUF_BYTES(2048)) dut (.*);
  icap_virtex2 #(.NUM_PRR(2)) u_icap (
    .CLK(clk_icap), .CE(icap_ce_n), .WRITE(icap_write_n), .I(icap_i), .O(icap_o),
    .BUSY(icap_busy), .rst_n(rst_icap_n), .cfg_loading, .cfg_func);

  always @(posedge clk_icap) if (!icap_ce_n && !icap_write_n) got.push_back(icap_i);

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

  task automatic configure(input int region, input int fn, input int n_frame, input bit slow_host);
    byte unsigned bs[$];
    logic [31:0] st, cyc, w;
    int i = 0, free;
    make_bitstream(region, fn, n_frame, bs);
    while (bs.size() % 4 != 0) bs.push_front(8'hFF);   // pad with dummy bytes in front
    got = {};
    hwrite(PR_LENGTH, bs.size());
    hwrite(PR_CTRL, 32'h1);
    while (i < bs.size()) begin
      hread(PR_STATUS, st);
      free = int'(st[27:16]);
      if (slow_host) free = (free > 3) ? 3 : free;
      for (int k = 0; k < free && i < bs.size(); k++) begin
        w = {bs[i+3], bs[i+2], bs[i+1], bs[i]};
        hwrite(PR_DATA, w);
        i += 4;
      end
      if (slow_host) repeat (40) @(negedge clk);
    end
    do hread(PR_STATUS, st); while (!st[1]);
    check(done, "done output");
    check(!st[0], "not busy when done");
    hread(PR_CYCLES, cyc);
    check(got.size() == bs.size(), $sformatf("ICAP got %0d bytes of %0d", got.size(), bs.size()));
    for (int k = 0; k < bs.size() && k < got.size(); k++) check(got[k] == bs[k], $sformatf("byte %0d", k));
    check(cfg_func[region] == func_t'(fn), "function configured");
    check(cyc >= bs.size(), $sformatf("cycles %0d not below bytes %0d", cyc, bs.size()));
    if (!slow_host) check(cyc <= bs.size() + bs.size() / 8 + 64,
                          $sformatf("host-fed rate: %0d cycles for %0d bytes", cyc, bs.size()));
    hwrite(PR_CTRL, 32'h2);
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(negedge clk_icap);
    rst_n = 1'b1; rst_icap_n = 1'b1;
    configure(0, 1, 6000, 1'b0);
    configure(1, 2, 300, 1'b1);
    configure(1, 3, 9000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
