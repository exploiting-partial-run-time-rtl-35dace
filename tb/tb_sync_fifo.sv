// tb_sync_fifo: self-checking testbench of the FIFO between memory and PRR.
//
// Random pushes and pops (never into a full or from an empty FIFO) are
// checked against a queue model: data order, rd_data of the oldest entry,
// count, full and empty. Phases drive it to full and back to empty.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic       wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [7:0] wr_data = '0, rd_data;
  logic [4:0] count;
  int         checks = 0, failures = 0, saw_full = 0;
  byte unsigned q[$];

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr_pct;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      wr_pct = ((n / 500) % 2 == 0) ? 80 : 20;
      check(count == 5'(q.size()), $sformatf("count %0d model %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("rd_data %0h model %0h", rd_data, q[0]));
      if (full) saw_full++;
      wr_en   = !full && ($urandom_range(99) < wr_pct);
      rd_en   = !empty && ($urandom_range(99) >= wr_pct);
      wr_data = 8'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
    end
    check(saw_full > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
