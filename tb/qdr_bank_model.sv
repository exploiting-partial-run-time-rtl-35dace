// qdr_bank_model: behavioural model of one local memory bank for the
// testbenches (a QDR-style SRAM with separate read and write ports).
//
// A write request stores wr_data at wr_addr at the clock edge. A read request
// returns the word at rd_addr on rd_valid/rd_data LATENCY cycles later, in
// order; both ports may be used in the same cycle. The array holds 2**AW
// bytes and starts at zero. The testbench reaches the contents through the
// mem array directly, as the host would through the host link.
module qdr_bank_model #(
  parameter int unsigned AW      = 22,
  parameter int unsigned LATENCY = 3
) (
  input  logic          clk,
  input  logic          rd_req,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [7:0]    rd_data,
  input  logic          wr_req,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data
);
  logic [7:0] mem [2**AW];
  logic       v_pipe [LATENCY];
  logic [7:0] d_pipe [LATENCY];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < LATENCY; i++) begin v_pipe[i] = 1'b0; d_pipe[i] = '0; end
  end

  // The array is written with a blocking assignment, after the read in the
  // same process, so a large array needs no copy for deferred update.
  always @(posedge clk) begin
    v_pipe[0] <= rd_req;
    d_pipe[0] <= mem[rd_addr];
    if (wr_req) mem[wr_addr] = wr_data;
    for (int i = 1; i < LATENCY; i++) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
  end

  assign rd_valid = v_pipe[LATENCY-1];
  assign rd_data  = d_pipe[LATENCY-1];
endmodule
