// pr_bitstream_buffer: the BRAM buffer of the partial-reconfiguration
// control unit, a dual-clock FIFO that takes 32-bit words from the host side
// and gives bytes to the ICAP side.
//
// The buffer exists because the host link (about 1.6 GB/s) is far faster than
// the ICAP (8 bits at 66 MHz): the host fills it in bursts while the ICAP side
// drains it at one byte per configuration clock, and data transfers of the
// running tasks can proceed meanwhile. Its size, 16 Kb (2048 bytes), and its
// BRAM implementation follow the document; the dual-clock FIFO organisation,
// the 32-bit write port and the byte order (byte 0 in bits 7:0 is sent
// first) are this design's.
//
// Write side (wclk): a word is stored when wr_en && !wr_full. wr_free is the
// number of free words, computed from a synchronised copy of the read pointer,
// so it may under-report by a few words but never over-report.
// Read side (rclk): a byte is read when rd_en && !rd_empty; it appears on
// rd_data with rd_valid one rclk cycle later (BRAM read latency). A word's
// slot is freed once its fourth byte has been read. Pointers cross the clock
// domains in Gray code through two-flop synchronizers.
module pr_bitstream_buffer #(
  parameter int unsigned DEPTH_BYTES = 2048,
  localparam int unsigned WORDS = DEPTH_BYTES / 4,
  localparam int unsigned WAW   = $clog2(WORDS)
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [31:0]   wr_data,
  output logic          wr_full,
  output logic [WAW:0]  wr_free,

  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic          rd_empty,
  output logic [7:0]    rd_data,
  output logic          rd_valid
);

  logic [31:0] mem [WORDS];

  // write side
  logic [WAW:0]  wptr, wptr_gray, rptr_gray_w, rptr_w;
  // read side: byte pointer; its upper bits are the word pointer
  logic [WAW+2:0] rbyte;
  logic [WAW:0]   rword, rword_gray, wptr_gray_r, wptr_r;

  function automatic logic [WAW:0] bin2gray(input logic [WAW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [WAW:0] gray2bin(input logic [WAW:0] g);
    logic [WAW:0] b;
    b[WAW] = g[WAW];
    for (int i = WAW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  assign wr_free = (WAW+1)'(WORDS) - (wptr - rptr_w);
  assign wr_full = (wr_free == '0);

  always_ff @(posedge wclk) begin
    if (wr_en && !wr_full) mem[wptr[WAW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr      <= '0;
      wptr_gray <= '0;
    end else if (wr_en && !wr_full) begin
      wptr      <= wptr + 1'b1;
      wptr_gray <= bin2gray(wptr + 1'b1);
    end
  end

  for (genvar i = 0; i <= WAW; i++) begin : g_sync_r2w
    cdc_sync u_sync (.clk(wclk), .rst_n(wrst_n), .d(rword_gray[i]), .q(rptr_gray_w[i]));
  end
  assign rptr_w = gray2bin(rptr_gray_w);

  // ---------------- read domain ----------------
  assign rword    = rbyte[WAW+2:2];
  assign rd_empty = (rword == wptr_r);

  for (genvar i = 0; i <= WAW; i++) begin : g_sync_w2r
    cdc_sync u_sync (.clk(rclk), .rst_n(rrst_n), .d(wptr_gray[i]), .q(wptr_gray_r[i]));
  end
  assign wptr_r = gray2bin(wptr_gray_r);

  logic [WAW+2:0] rbyte_next;
  assign rbyte_next = rbyte + 1'b1;

  logic [31:0] rd_word;
  logic [1:0]  rd_lane;

  always_ff @(posedge rclk) begin
    if (rd_en && !rd_empty) begin
      rd_word <= mem[rword[WAW-1:0]];
      rd_lane <= rbyte[1:0];
    end
  end
  assign rd_data = rd_word[8*rd_lane +: 8];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbyte      <= '0;
      rword_gray <= '0;
      rd_valid   <= 1'b0;
    end else begin
      rd_valid <= rd_en && !rd_empty;
      if (rd_en && !rd_empty) begin
        rbyte      <= rbyte_next;
        rword_gray <= bin2gray(rbyte_next[WAW+2:2]);
      end
    end
  end

endmodule
