// tb_icap_virtex2: self-checking testbench of the ICAP behavioural model.
//
// Bitstreams for each region and function are written byte by byte with
// random idle cycles (CE high) and noise bytes between them. Checks: the
// target region's cfg_loading rises after its header and falls at the DESYNC,
// its function is blank while loading and takes the new code at the end, the
// other region is untouched, and a header for a region that does not exist
// changes nothing.
module tb_icap_virtex2;
  import prtr_pkg::*;
  import tb_ref_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b1, CE = 1'b1, WRITE = 1'b1, BUSY;
  logic [7:0] I = '0, O;
  logic [1:0] cfg_loading;
  func_t      cfg_func [2];
  int         checks = 0, failures = 0;

  always #15 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end
  icap_virtex2 #(.NUM_PRR(2)) dut (.CLK(clk), .*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic send(input byte unsigned b);
    while ($urandom_range(3) == 0) begin
      CE = 1'b1; WRITE = 1'b1; I = 8'h30;   // idle cycles, bus value must be ignored
      @(negedge clk);
    end
    CE = 1'b0; WRITE = 1'b0; I = b;
    @(negedge clk);
    CE = 1'b1; WRITE = 1'b1;
  endtask

  task automatic configure(input int region, input int fn);
    byte unsigned bs[$];
    func_t other_before;
    int other;
    other = 1 - region;
    other_before = cfg_func[other];
    make_bitstream(region, fn, $urandom_range(20, 60), bs);
    foreach (bs[i]) begin
      send(bs[i]);
      if (region < 2 && i >= 7 && i < bs.size() - 1) begin
        check(cfg_loading[region], $sformatf("region %0d loading during frames", region));
        if (i >= 8) check(cfg_func[region] == FN_BLANK, "function blank while loading");
      end
    end
    check(cfg_loading == 2'b00, "loading dropped after DESYNC");
    if (region < 2) check(cfg_func[region] == func_t'(fn), $sformatf("region %0d has function %0d", region, fn));
    if (region < 2) check(cfg_func[other] == other_before, "other region untouched");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    func_t f0, f1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cfg_func[0] == FN_BLANK && cfg_func[1] == FN_BLANK && cfg_loading == 0, "blank after reset");
    configure(0, 1);
    configure(1, 2);
    configure(0, 3);
    configure(1, 1);
    f0 = cfg_func[0]; f1 = cfg_func[1];
    configure(5, 2);
    check(cfg_func[0] == f0 && cfg_func[1] == f1, "header for a missing region ignored");
    check(!BUSY && O == 8'h00, "no readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
