// tb_mem_reader: self-checking testbench of the memory reader.
//
// A bank model with a three-cycle read latency holds random bytes. The
// reader streams a block into a small FIFO that the testbench drains slowly
// and at random, so the credit limit is exercised: the FIFO must never
// overflow (assertion in sync_fifo plus a check here), and every byte must
// arrive in order from the right addresses. With the FIFO drained every
// cycle the reader must sustain one read per cycle.
module tb_mem_reader;
  localparam int AW = 12, DEPTH = 8;
  logic          clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [AW-1:0] base = '0;
  logic [31:0]   count = '0;
  logic          busy, rd_req, rd_valid, fifo_wr, full, empty, pop = 1'b0;
  logic [AW-1:0] rd_addr;
  logic [7:0]    rd_data, fifo_wdata, fifo_rdata;
  logic [$clog2(DEPTH):0] fifo_count;
  int            checks = 0, failures = 0, overflow = 0, max_count = 0;

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end

  mem_reader #(.AW(AW), .FIFO_DEPTH(DEPTH)) dut (.*);
  qdr_bank_model #(.AW(AW), .LATENCY(3)) u_bank (
    .clk, .rd_req, .rd_addr, .rd_valid, .rd_data,
    .wr_req(1'b0), .wr_addr('0), .wr_data('0));
  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr), .wr_data(fifo_wdata), .full,
    .rd_en(pop), .rd_data(fifo_rdata), .empty, .count(fifo_count));

  always @(posedge clk) begin
    if (fifo_wr && full) overflow++;
    if (int'(fifo_count) > max_count) max_count = int'(fifo_count);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int b, input int n, input int pop_pct, output int cycles);
    int got = 0, t0;
    @(negedge clk);
    base = AW'(b); count = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = $time;
    while (got < n) begin
      pop = !empty && ($urandom_range(99) < pop_pct);
      if (pop) begin
        check(fifo_rdata == u_bank.mem[AW'(b + got)], $sformatf("byte %0d: got %0h expected %0h", got, fifo_rdata, u_bank.mem[AW'(b + got)]));
        got++;
      end
      @(negedge clk);
    end
    pop = 1'b0;
    cycles = ($time - t0) / 10;
    repeat (2) @(negedge clk);
    check(!busy, "busy low after the block");
    check(empty, "no extra bytes");
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    #1;  // after the bank model has cleared its array
    for (int i = 0; i < 2**AW; i++) u_bank.mem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(100, 200, 30, cyc);
    check(max_count == DEPTH, "FIFO filled to its depth under back-pressure");
    run(2**AW - 50, 100, 70, cyc);   // address wraps at the bank end
    run(7, 1, 100, cyc);
    run(0, 300, 100, cyc);
    check(cyc <= 300 + 6, $sformatf("300 bytes took %0d cycles with free drain", cyc));
    check(overflow == 0, "no FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
