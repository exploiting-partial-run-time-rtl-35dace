// pr_addr_decoder: host-side address decoder of the partial-reconfiguration
// control unit.
//
// It turns host register accesses to the unit into write strobes for the
// control registers and for the bitstream buffer, and returns register
// contents on reads. The decoder is a block of the document's control unit;
// the register offsets (prtr_pkg PR_*) and the one-cycle read latency are
// this design's.
//
// Interface: sel qualifies wr/rd for this unit; addr is the byte offset
// inside the unit. Writes take effect in the cycle they are presented (the
// strobes are combinational); a read returns rdata with rvalid one cycle
// later. Unmapped offsets read as zero and ignore writes.
module pr_addr_decoder
  import prtr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        wr,
  input  logic        rd,
  input  logic [11:0] addr,
  // write strobes
  output logic        ctrl_we,
  output logic        length_we,
  output logic        data_we,
  // register contents for read-back
  input  logic [31:0] length_q,
  input  logic [31:0] status_q,
  input  logic [31:0] cycles_q,
  output logic [31:0] rdata,
  output logic        rvalid
);

  logic [31:0] rmux;

  assign ctrl_we   = sel && wr && (addr == PR_CTRL);
  assign length_we = sel && wr && (addr == PR_LENGTH);
  assign data_we   = sel && wr && (addr == PR_DATA);

  always_comb begin
    unique case (addr)
      PR_LENGTH: rmux = length_q;
      PR_STATUS: rmux = status_q;
      PR_CYCLES: rmux = cycles_q;
      default:   rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= sel && rd;
      if (sel && rd) rdata <= rmux;
    end
  end

endmodule
