// pr_fsm: control state machine of the partial-reconfiguration unit, in the
// 66 MHz configuration clock domain.
//
// On start it sends `length` bytes from the bitstream buffer to the ICAP, one
// byte per clock whenever the buffer holds data, and then reports completion.
// The host keeps refilling the buffer meanwhile, so bitstreams far larger
// than the buffer pass through it. The document gives the state machine's
// role (moving the bitstream from the BRAM buffer to the ICAP); the states,
// the counters and the start/done handshake are this design's.
//
// Interface: start is a one-cycle pulse (already synchronised to clk);
// length must be stable from start to done. The buffer has a one-cycle read
// latency (buf_rd_en, then buf_valid with buf_data). ICAP strobes are active
// low and registered: a byte reaches the ICAP one cycle after buf_valid.
// The Virtex-II ICAP uses BUSY only for readback, so writes ignore it.
// done_toggle changes once per finished configuration, for crossing into the
// host domain; cycles holds the clock count of the last configuration from
// start to the last byte, stable until the next start.
module pr_fsm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] length,
  // bitstream buffer read port
  input  logic        buf_empty,
  output logic        buf_rd_en,
  input  logic [7:0]  buf_data,
  input  logic        buf_valid,
  // ICAP write port
  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [7:0]  icap_i,
  // status
  output logic        busy,
  output logic        done_toggle,
  output logic [31:0] cycles
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_FLUSH} state_t;
  state_t      state;
  logic [31:0] to_read;   // bytes still to request from the buffer
  logic [31:0] to_send;   // bytes still to write to the ICAP

  assign busy      = (state != S_IDLE);
  assign buf_rd_en = (state == S_LOAD) && !buf_empty && (to_read != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      to_read      <= '0;
      to_send      <= '0;
      cycles       <= '0;
      done_toggle  <= 1'b0;
      icap_ce_n    <= 1'b1;
      icap_write_n <= 1'b1;
      icap_i       <= '0;
    end else begin
      // ICAP write register: one byte per buffer read
      icap_ce_n    <= !buf_valid;
      icap_write_n <= !buf_valid;
      if (buf_valid) icap_i <= buf_data;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            to_read <= length;
            to_send <= length;
            cycles  <= '0;
            state   <= S_LOAD;
          end
        end
        S_LOAD: begin
          cycles <= cycles + 1;
          if (buf_rd_en) to_read <= to_read - 1;
          if (buf_valid) to_send <= to_send - 1;
          // last byte handed to the ICAP register this cycle (or nothing to send)
          if (to_send == '0 || (to_send == 32'd1 && buf_valid)) state <= S_FLUSH;
        end
        S_FLUSH: begin
          // the last ICAP strobe is on the port during this cycle
          done_toggle <= !done_toggle;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_extra_bytes: assert property (@(posedge clk) disable iff (!rst_n)
    buf_valid |-> (state == S_LOAD && to_send != '0));

endmodule
