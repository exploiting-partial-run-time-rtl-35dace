// tb_pr_bitstream_buffer: self-checking testbench of the dual-clock bitstream
// buffer.
//
// The write side (period 10) pushes 32-bit words whenever wr_full is low and
// a random draw allows; the read side (period 30, about the 200/66 MHz ratio)
// pulls bytes at random. The byte stream must come out in order, byte 0 of
// each word first, with no loss or duplication, wr_free must never exceed the
// true free space, and the buffer must report full when the reader stalls.
module tb_pr_bitstream_buffer;
  localparam int BYTES = 64;
  logic        wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b1, rrst_n = 1'b1;
  logic        wr_en = 1'b0, wr_full, rd_en = 1'b0, rd_empty, rd_valid;
  logic [31:0] wr_data = '0;
  logic [$clog2(BYTES/4):0] wr_free;
  logic [7:0]  rd_data;
  int          checks = 0, failures = 0, saw_full = 0, n_words = 0, n_bytes = 0;
  bit          stall_reader = 1'b0, writing_done = 1'b0;
  int          rcyc = 0;
  byte unsigned q[$];

  always #5  wclk = !wclk;
  always #15 rclk = !rclk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    wrst_n = 1'b0;
    rrst_n = 1'b0;
  end

  pr_bitstream_buffer #(.DEPTH_BYTES(BYTES)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  localparam int TOTAL_WORDS = 400;

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    @(negedge wclk);
    wrst_n = 1'b1;
    while (n_words < TOTAL_WORDS) begin
      // free space reported never exceeds the true free space
      check(int'(wr_free) <= BYTES/4 - (q.size() + 3) / 4 + 1, "wr_free not above true free");
      if (wr_full) saw_full++;
      wr_en   = !wr_full && ($urandom_range(3) != 0);
      wr_data = $urandom;
      if (wr_en) begin
        for (int b = 0; b < 4; b++) q.push_back(wr_data[8*b +: 8]);
        n_words++;
      end
      @(negedge wclk);
    end
    wr_en = 1'b0;
    writing_done = 1'b1;
  end

  // reader
  initial begin
    repeat (4) @(posedge rclk);
    @(negedge rclk);
    rrst_n = 1'b1;
    while (n_bytes < TOTAL_WORDS * 4) begin
      rcyc++;
      stall_reader = (rcyc > 100 && rcyc < 200);
      rd_en = !rd_empty && !stall_reader && ($urandom_range(3) != 0);
      @(posedge rclk);
      #1;
      if (rd_valid) begin
        check(q.size() > 0 && rd_data == q[0], $sformatf("byte %0d: got %0h", n_bytes, rd_data));
        if (q.size() > 0) void'(q.pop_front());
        n_bytes++;
      end
      @(negedge rclk);
    end
    rd_en = 1'b0;
    repeat (4) @(posedge rclk);
    check(rd_empty, "buffer empty at the end");
    check(saw_full > 0, "buffer reported full while the reader stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
