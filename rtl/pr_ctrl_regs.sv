// pr_ctrl_regs: control and status registers of the partial-reconfiguration
// control unit, in the host (static-region) clock domain.
//
// They hold the bitstream length, issue the start of a configuration to the
// state machine in the 66 MHz configuration domain, and collect its busy,
// done and cycle-count results for the host. The block is the document's;
// the register fields and the toggle handshake across the clock domains are
// this design's.
//
// A write of bit 0 to CTRL starts a configuration of `length` bytes: it flips
// start_toggle, which the configuration domain synchronises. busy is high
// from that write until the state machine's done_toggle change has been
// synchronised back; done is then set and stays set until CTRL bit 1 is
// written or the next start. cycles_q captures the configuration domain's
// cycle count on that done event (the count is stable by then). length must
// not be written while busy. The status word is
// {4'b0, free_words[11:0], 14'b0, done, busy}.
module pr_ctrl_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ctrl_we,
  input  logic        length_we,
  input  logic [31:0] wdata,
  input  logic [11:0] free_words,
  // from the configuration domain
  input  logic        done_toggle_icap,
  input  logic [31:0] cycles_icap,
  // to the configuration domain
  output logic        start_toggle,
  output logic [31:0] length_q,
  // host view
  output logic [31:0] status_q,
  output logic [31:0] cycles_q,
  output logic        busy,
  output logic        done
);

  logic done_sync, done_seen;

  cdc_sync u_done_sync (.clk, .rst_n, .d(done_toggle_icap), .q(done_sync));

  assign status_q = {4'b0, free_words, 14'b0, done, busy};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      length_q     <= '0;
      start_toggle <= 1'b0;
      busy         <= 1'b0;
      done         <= 1'b0;
      done_seen    <= 1'b0;
      cycles_q     <= '0;
    end else begin
      done_seen <= done_sync;
      if (length_we && !busy) length_q <= wdata;
      if (done_sync != done_seen) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        cycles_q <= cycles_icap;
      end
      if (ctrl_we && wdata[1]) done <= 1'b0;
      if (ctrl_we && wdata[0] && !busy) begin
        start_toggle <= !start_toggle;
        busy         <= 1'b1;
        done         <= 1'b0;
      end
    end
  end

endmodule
