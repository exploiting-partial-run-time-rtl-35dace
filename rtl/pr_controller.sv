// pr_controller: partial-reconfiguration control unit of the static region.
//
// The host cannot reach the FPGA's external configuration port for partial
// bitstreams, so the bitstream travels over the ordinary host-to-FPGA data
// channel into this unit, which feeds it to the internal configuration access
// port (ICAP). As in the document, the unit is an address decoder, control
// registers, a state machine and a 16 Kb BRAM buffer in front of the ICAP;
// the decoder, registers and the buffer's write side run on the 200 MHz
// host-side clock, the state machine and the buffer's read side on the
// 66 MHz ICAP clock.
//
// Host protocol: write LENGTH, write CTRL bit 0, then write the bitstream
// as 32-bit words to DATA (byte 0 in bits 7:0 first) while STATUS[27:16]
// (free words in the buffer) is non-zero; poll STATUS bit 1 (done) or use
// the done output. Words may also be written before the start. CYCLES reads
// the ICAP clock cycles the last configuration took, which is the
// partial-configuration time of the execution model. Writes to DATA when the
// buffer is full are dropped (assertion in simulation).
// ICAP port: active-low CE and WRITE plus 8-bit data, one byte per clk_icap
// cycle at most.
module pr_controller
  import prtr_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_icap,
  input  logic        rst_icap_n,
  // host register port
  input  logic        sel,
  input  logic        wr,
  input  logic        rd,
  input  logic [11:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rvalid,
  output logic        done,
  // ICAP port
  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [7:0]  icap_i,
  input  logic        icap_busy
);

  localparam int unsigned WAW = $clog2(BUF_BYTES / 4);

  logic        ctrl_we, length_we, data_we;
  logic [31:0] length_q, status_q, cycles_q, cycles_icap;
  logic        start_toggle, done_toggle_icap, busy_host;
  logic        wr_full;
  logic [WAW:0] wr_free;
  logic        start_sync, start_seen, start_pulse;
  logic        buf_empty, buf_rd_en, buf_valid, fsm_busy;
  logic [7:0]  buf_data;

  pr_addr_decoder u_dec (
    .clk, .rst_n, .sel, .wr, .rd, .addr,
    .ctrl_we, .length_we, .data_we,
    .length_q, .status_q, .cycles_q, .rdata, .rvalid
  );

  pr_ctrl_regs u_regs (
    .clk, .rst_n, .ctrl_we, .length_we, .wdata,
    .free_words(12'(wr_free)),
    .done_toggle_icap, .cycles_icap,
    .start_toggle, .length_q, .status_q, .cycles_q,
    .busy(busy_host), .done
  );

  pr_bitstream_buffer #(.DEPTH_BYTES(BUF_BYTES)) u_buf (
    .wclk(clk), .wrst_n(rst_n), .wr_en(data_we), .wr_data(wdata),
    .wr_full, .wr_free,
    .rclk(clk_icap), .rrst_n(rst_icap_n), .rd_en(buf_rd_en),
    .rd_empty(buf_empty), .rd_data(buf_data), .rd_valid(buf_valid)
  );

  // start toggle into the configuration domain
  cdc_sync u_start_sync (.clk(clk_icap), .rst_n(rst_icap_n), .d(start_toggle), .q(start_sync));
  always_ff @(posedge clk_icap or negedge rst_icap_n) begin
    if (!rst_icap_n) start_seen <= 1'b0;
    else             start_seen <= start_sync;
  end
  assign start_pulse = start_sync != start_seen;

  pr_fsm u_fsm (
    .clk(clk_icap), .rst_n(rst_icap_n), .start(start_pulse), .length(length_q),
    .buf_empty, .buf_rd_en, .buf_data, .buf_valid,
    .icap_ce_n, .icap_write_n, .icap_i,
    .busy(fsm_busy), .done_toggle(done_toggle_icap), .cycles(cycles_icap)
  );

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) !(data_we && wr_full));

  // The Virtex-II ICAP raises BUSY only during readback, which this unit does not use.
  logic unused;
  assign unused = icap_busy ^ fsm_busy ^ busy_host;

endmodule
