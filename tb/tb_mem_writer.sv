// tb_mem_writer: self-checking testbench of the memory writer.
//
// A FIFO is filled at random times with random bytes; the writer must copy
// exactly `count` of them, in order, to consecutive addresses from base in a
// bank model, pulse done once and leave the rest of the bank untouched.
module tb_mem_writer;
  localparam int AW = 12;
  logic          clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [AW-1:0] base = '0;
  logic [31:0]   count = '0;
  logic          busy, done, fifo_empty, fifo_rd, wr_req, full, push = 1'b0;
  logic [AW-1:0] wr_addr;
  logic [7:0]    wr_data, fifo_rdata, push_data = '0;
  int            checks = 0, failures = 0, dones = 0;

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end

  mem_writer #(.AW(AW)) dut (.*);
  sync_fifo #(.WIDTH(8), .DEPTH(16)) u_fifo (
    .clk, .rst_n, .wr_en(push), .wr_data(push_data), .full,
    .rd_en(fifo_rd), .rd_data(fifo_rdata), .empty(fifo_empty), .count());
  qdr_bank_model #(.AW(AW), .LATENCY(2)) u_bank (
    .clk, .rd_req(1'b0), .rd_addr('0), .rd_valid(), .rd_data(),
    .wr_req, .wr_addr, .wr_data);

  always @(posedge clk) if (done) dones++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int b, input int n);
    byte unsigned data[$];
    int sent = 0, d0 = dones;
    for (int i = 0; i < 2**AW; i++) u_bank.mem[i] = 8'hEE;
    @(negedge clk);
    base = AW'(b); count = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      push = !full && sent < n && ($urandom_range(2) == 0);
      push_data = 8'($urandom);
      if (push) begin data.push_back(push_data); sent++; end
      @(negedge clk);
    end
    push = 1'b0;
    repeat (3) @(negedge clk);
    check(dones == d0 + 1, "one done pulse");
    for (int i = 0; i < n; i++)
      check(u_bank.mem[AW'(b + i)] == data[i], $sformatf("result %0d", i));
    check(u_bank.mem[AW'(b + n)] == 8'hEE, "no write past the block");
    check(u_bank.mem[AW'(b - 1)] == 8'hEE, "no write before the block");
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(10, 50);
    run(1000, 1);
    run(2000, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
