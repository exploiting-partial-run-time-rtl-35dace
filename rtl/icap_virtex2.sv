// icap_virtex2: behavioural model of the Virtex-II Pro internal configuration
// access port (ICAP) together with the configuration memory of the
// partially reconfigurable regions. It is a simulation model of a device
// primitive, not logic to be synthesised into fabric.
//
// The real port (CLK, active-low CE and WRITE, 8-bit I and O, BUSY) takes a
// configuration bitstream one byte per clock, at most 66 MHz. A real partial
// bitstream rewrites the configuration frames of one region; the model
// replaces that with a reduced format that a testbench can generate:
//   AA 99 55 66          sync word (as in Virtex bitstreams)
//   <region> <function>  target PRR index and function code (prtr_pkg::func_t)
//   <frame bytes ...>    any number of bytes, ignored
//   30 00 80 01 00 00 00 0D   command-register write of DESYNC, ending it
// From the header byte until the DESYNC, cfg_loading[region] is high: the
// region's logic is being rewritten and must be held idle. At the DESYNC,
// cfg_func[region] takes the new function and cfg_loading drops. A header
// naming a region that does not exist is ignored. Readback is not modelled:
// O reads zero and BUSY stays low. The extra cfg_* outputs stand for the
// effect of configuration on the fabric and have no counterpart pin.
module icap_virtex2
  import prtr_pkg::*;
#(
  parameter int unsigned NUM_PRR = 2
) (
  input  logic        CLK,
  input  logic        CE,
  input  logic        WRITE,
  input  logic [7:0]  I,
  output logic [7:0]  O,
  output logic        BUSY,
  // configuration plane of the PRRs
  input  logic        rst_n,
  output logic [NUM_PRR-1:0] cfg_loading,
  output func_t       cfg_func [NUM_PRR]
);

  localparam int unsigned RW = (NUM_PRR > 1) ? $clog2(NUM_PRR) : 1;
  localparam logic [63:0] DESYNC_SEQ = 64'h3000_8001_0000_000D;

  typedef enum logic [1:0] {P_HUNT, P_REGION, P_FUNC, P_FRAMES} parse_t;
  parse_t      pstate;
  logic [55:0] last7;      // the last seven bytes written
  logic [63:0] hist;       // the same, including the byte on I now
  logic [RW-1:0] region;
  func_t       new_func;
  logic        strobe;

  assign O      = 8'h00;
  assign BUSY   = 1'b0;
  assign strobe = !CE && !WRITE;
  assign hist   = {last7, I};

  always_ff @(posedge CLK or negedge rst_n) begin
    if (!rst_n) begin
      pstate      <= P_HUNT;
      last7       <= '0;
      region      <= '0;
      new_func    <= FN_BLANK;
      cfg_loading <= '0;
      for (int r = 0; r < NUM_PRR; r++) cfg_func[r] <= FN_BLANK;
    end else if (strobe) begin
      last7 <= hist[55:0];
      unique case (pstate)
        P_HUNT: if (hist[31:0] == SYNC_WORD) pstate <= P_REGION;
        P_REGION: begin
          if (32'(I) < NUM_PRR) begin
            region              <= RW'(I);
            cfg_loading[RW'(I)] <= 1'b1;
            pstate              <= P_FUNC;
          end else begin
            pstate <= P_HUNT;
          end
        end
        P_FUNC: begin
          // the old function is gone as soon as frames are rewritten
          new_func         <= func_t'(I[3:0]);
          cfg_func[region] <= FN_BLANK;
          pstate           <= P_FRAMES;
        end
        P_FRAMES: begin
          if (hist == DESYNC_SEQ) begin
            cfg_func[region]    <= new_func;
            cfg_loading[region] <= 1'b0;
            pstate              <= P_HUNT;
          end
        end
        default: pstate <= P_HUNT;
      endcase
    end
  end

endmodule
