// mem_writer: static-region memory interface that drains a PRR's output FIFO
// into the task's result area of a local memory bank.
//
// After start it pops one result per cycle whenever the FIFO holds one and
// writes it to consecutive addresses from base, `count` results in all;
// busy then drops and done pulses for one cycle. The host reads the results
// from the bank afterwards. The document gives the role (hardware functions
// write their results to local memory, through FIFOs); the port and the
// sequencing are this design's.
module mem_writer #(
  parameter int unsigned AW = 22
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [31:0]   count,
  output logic          busy,
  output logic          done,
  // output FIFO read port (first-word fall-through)
  input  logic          fifo_empty,
  input  logic [7:0]    fifo_rdata,
  output logic          fifo_rd,
  // memory bank write port
  output logic          wr_req,
  output logic [AW-1:0] wr_addr,
  output logic [7:0]    wr_data
);

  logic [31:0]   remaining;
  logic [AW-1:0] next_addr;

  assign fifo_rd = busy && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      remaining <= '0;
      next_addr <= '0;
      wr_req    <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
    end else begin
      done   <= 1'b0;
      wr_req <= fifo_rd;
      if (fifo_rd) begin
        wr_addr   <= next_addr;
        wr_data   <= fifo_rdata;
        next_addr <= next_addr + 1'b1;
      end
      if (start) begin
        busy      <= 1'b1;
        remaining <= count;
        next_addr <= base;
      end else if (busy) begin
        if (remaining == '0 || (remaining == 32'd1 && fifo_rd)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        if (fifo_rd) remaining <= remaining - 1;
      end
    end
  end

endmodule
