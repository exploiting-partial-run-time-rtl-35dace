// mem_reader: static-region memory interface that streams a task's input
// image from its local memory bank into the PRR's input FIFO.
//
// In the document's scenario the host places the image in an FPGA-local
// memory bank and the hardware function reads it from there; the FIFO in
// front of the PRR keeps data available while memory is being read. The
// reader issues one read per cycle from base upward, `count` pixels in all,
// while the FIFO has room for every outstanding read, so it never overflows
// whatever the bank's read latency. The credit scheme and the bank port are
// this design's.
//
// Bank port: rd_req with rd_addr; the bank answers each request with rd_valid
// and rd_data a fixed number of cycles later, in order. start is a one-cycle
// pulse; busy stays high until the last word has been pushed into the FIFO.
module mem_reader #(
  parameter int unsigned AW         = 22,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [31:0]   count,
  output logic          busy,
  // memory bank read port
  output logic          rd_req,
  output logic [AW-1:0] rd_addr,
  input  logic          rd_valid,
  input  logic [7:0]    rd_data,
  // input FIFO write port
  input  logic [CW-1:0] fifo_count,
  output logic          fifo_wr,
  output logic [7:0]    fifo_wdata
);

  logic [31:0]   to_issue, to_receive;
  logic [CW:0]   outstanding;
  logic          room;

  assign room       = ({1'b0, fifo_count} + outstanding) < (CW+1)'(FIFO_DEPTH);
  assign rd_req     = busy && (to_issue != '0) && room;
  assign fifo_wr    = rd_valid;
  assign fifo_wdata = rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      to_issue    <= '0;
      to_receive  <= '0;
      outstanding <= '0;
      rd_addr     <= '0;
    end else begin
      outstanding <= outstanding + (CW+1)'(rd_req) - (CW+1)'(rd_valid);
      if (start) begin
        busy       <= (count != '0);
        to_issue   <= count;
        to_receive <= count;
        rd_addr    <= base;
      end else if (busy) begin
        if (rd_req) begin
          to_issue <= to_issue - 1;
          rd_addr  <= rd_addr + 1'b1;
        end
        if (rd_valid) begin
          to_receive <= to_receive - 1;
          if (to_receive == 32'd1) busy <= 1'b0;
        end
      end
    end
  end

endmodule
