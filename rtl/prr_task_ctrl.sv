// prr_task_ctrl: task registers of one PRR, in the static region.
//
// The host starts a configured hardware function (the "transfer of control"
// of the execution model) by writing the image size and the base addresses
// of the input and output areas and then CTRL bit 0. The block then starts
// the memory reader, the core in the PRR and the memory writer together, and
// reports done when the last result is in memory. TK_CYCLES holds the clock
// cycles of the last task, the task time of the execution model. A start
// while the region is blank or being reconfigured is refused and sets the
// error bit. The document describes the flow (host places data in local
// memory, the function reads and writes it, the host reads results back);
// the registers and this sequencing are this design's.
//
// Host port: as pr_addr_decoder (combinational write, read data one cycle
// later). Status word: {20'b0, func[3:0], 4'b0, err, loading, done, busy}.
module prr_task_ctrl
  import prtr_pkg::*;
#(
  parameter int unsigned AW = 22
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel,
  input  logic          wr,
  input  logic          rd,
  input  logic [11:0]   addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  output logic          rvalid,
  output logic          done_irq,
  // region state
  input  func_t         func,
  input  logic          loading,
  // task control
  output logic          task_start,
  output logic [15:0]   width,
  output logic [15:0]   height,
  output logic [AW-1:0] src_base,
  output logic [AW-1:0] dst_base,
  output logic [31:0]   in_count,
  output logic [31:0]   out_count,
  input  logic          writer_done
);

  logic        busy, done, err;
  logic [31:0] cycles, rmux;
  logic        go;

  assign go        = sel && wr && (addr == TK_CTRL) && wdata[0] && !busy;
  assign in_count  = 32'(width) * 32'(height);
  assign out_count = interior_pixels(width, height);
  assign done_irq  = done;

  always_comb begin
    unique case (addr)
      TK_STATUS: rmux = {20'b0, func, 4'b0, err, loading, done, busy};
      TK_WIDTH:  rmux = 32'(width);
      TK_HEIGHT: rmux = 32'(height);
      TK_SRC:    rmux = 32'(src_base);
      TK_DST:    rmux = 32'(dst_base);
      TK_CYCLES: rmux = cycles;
      default:   rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      err        <= 1'b0;
      cycles     <= '0;
      task_start <= 1'b0;
      width      <= '0;
      height     <= '0;
      src_base   <= '0;
      dst_base   <= '0;
      rdata      <= '0;
      rvalid     <= 1'b0;
    end else begin
      task_start <= 1'b0;
      rvalid     <= sel && rd;
      if (sel && rd) rdata <= rmux;
      if (sel && wr && !busy) begin
        unique case (addr)
          TK_WIDTH:  width    <= wdata[15:0];
          TK_HEIGHT: height   <= wdata[15:0];
          TK_SRC:    src_base <= AW'(wdata);
          TK_DST:    dst_base <= AW'(wdata);
          default: ;
        endcase
      end
      if (sel && wr && (addr == TK_CTRL) && wdata[1]) begin
        done <= 1'b0;
        err  <= 1'b0;
      end
      if (go) begin
        if (func == FN_BLANK || loading) begin
          err <= 1'b1;
        end else begin
          busy       <= 1'b1;
          done       <= 1'b0;
          err        <= 1'b0;
          cycles     <= '0;
          task_start <= 1'b1;
        end
      end else if (busy) begin
        cycles <= cycles + 1;
        if (writer_done && !task_start) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
