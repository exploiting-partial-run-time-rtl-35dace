// prtr_top: FPGA design of a hybrid CPU/FPGA node with partial run-time
// reconfiguration: a static region and NUM_PRR partially reconfigurable
// regions (PRRs) that each hold one image-processing core at a time.
//
// Static region: the host register port (the host link itself is vendor
// IP and is outside this design), the partial-reconfiguration controller with
// its bitstream buffer feeding the ICAP, and for every PRR a memory reader,
// an input FIFO, an output FIFO, a memory writer and the task registers.
// PRR i reads its input from local memory bank 2i and writes its results to
// bank 2i+1, two banks per region as in the dual-region layout. A PRR can be
// reconfigured through the ICAP while the other PRR runs a task, which is
// what lets configuration overlap execution.
//
// Host address map: addr[15:12] = 0 selects the PR controller, 1 + i selects
// the task registers of PRR i (offsets in prtr_pkg). Writes act at once, a
// read returns host_rdata with host_rvalid one cycle later.
// Memory banks: QDR-style separate read and write ports per bank; a read
// request is answered by bank_rvalid/bank_rdata a fixed number of cycles
// later, in order. The banks, the host link and the ICAP primitive are
// outside the fabric logic: the banks are ports, the ICAP is a behavioural
// model instantiated here.
// Clocks: clk (200 MHz) for the static region and the cores, clk_icap
// (66 MHz) for the configuration path; the resets are asynchronous, active
// low, one per domain.
// The structure (static region with PR controller, ICAP, FIFOs and memory
// interfaces; one or two PRRs; two banks per PRR) follows the document; the
// address map, the bank port and the task sequencing are this design's.
module prtr_top
  import prtr_pkg::*;
#(
  parameter int unsigned NUM_PRR    = 2,
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned AW         = 22,
  parameter int unsigned IMG_W_MAX  = 2048,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned BUF_BYTES  = 2048
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clk_icap,
  input  logic                 rst_icap_n,
  // host register port
  input  logic                 host_wr,
  input  logic                 host_rd,
  input  logic [15:0]          host_addr,
  input  logic [31:0]          host_wdata,
  output logic [31:0]          host_rdata,
  output logic                 host_rvalid,
  output logic                 pr_done,
  output logic [NUM_PRR-1:0]   task_done,
  // local memory banks
  output logic [NUM_BANKS-1:0] bank_rd_req,
  output logic [AW-1:0]        bank_rd_addr [NUM_BANKS],
  input  logic [NUM_BANKS-1:0] bank_rvalid,
  input  logic [7:0]           bank_rdata   [NUM_BANKS],
  output logic [NUM_BANKS-1:0] bank_wr_req,
  output logic [AW-1:0]        bank_wr_addr [NUM_BANKS],
  output logic [7:0]           bank_wdata   [NUM_BANKS]
);

  localparam int unsigned FCW = $clog2(FIFO_DEPTH) + 1;

  if (NUM_BANKS < 2 * NUM_PRR) begin : g_bad_cfg
    $error("prtr_top needs two memory banks per PRR");
  end

  // ---------------- host decode ----------------
  logic [3:0]  unit;
  logic        pr_sel;
  logic [31:0] pr_rdata;
  logic        pr_rvalid;
  logic [31:0] tk_rdata  [NUM_PRR];
  logic [NUM_PRR-1:0] tk_rvalid;

  assign unit   = host_addr[15:12];
  assign pr_sel = (unit == 4'd0);

  always_comb begin
    host_rdata  = pr_rvalid ? pr_rdata : '0;
    host_rvalid = pr_rvalid | (|tk_rvalid);
    for (int i = 0; i < NUM_PRR; i++)
      if (tk_rvalid[i]) host_rdata = tk_rdata[i];
  end

  // ---------------- PR controller and ICAP ----------------
  logic        icap_ce_n, icap_write_n, icap_busy;
  logic [7:0]  icap_i, icap_o;
  logic [NUM_PRR-1:0] cfg_loading;
  func_t       cfg_func [NUM_PRR];

  pr_controller #(.BUF_BYTES(BUF_BYTES)) u_pr_ctrl (
    .clk, .rst_n, .clk_icap, .rst_icap_n,
    .sel(pr_sel), .wr(host_wr), .rd(host_rd), .addr(host_addr[11:0]), .wdata(host_wdata),
    .rdata(pr_rdata), .rvalid(pr_rvalid), .done(pr_done),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy
  );

  icap_virtex2 #(.NUM_PRR(NUM_PRR)) u_icap (
    .CLK(clk_icap), .CE(icap_ce_n), .WRITE(icap_write_n), .I(icap_i),
    .O(icap_o), .BUSY(icap_busy),
    .rst_n(rst_icap_n), .cfg_loading, .cfg_func
  );

  // ---------------- one lane per PRR ----------------
  for (genvar i = 0; i < NUM_PRR; i++) begin : g_prr
    localparam int unsigned BIN  = 2 * i;
    localparam int unsigned BOUT = 2 * i + 1;

    func_t         func;
    logic          loading, task_start, writer_done;
    logic [15:0]   width, height;
    logic [AW-1:0] src_base, dst_base;
    logic [31:0]   in_count, out_count;
    logic          rd_busy, wr_busy;
    // input side
    logic          ififo_wr, ififo_full, ififo_empty, ififo_rd;
    logic [7:0]    ififo_wdata, ififo_rdata;
    logic [FCW-1:0] ififo_count;
    // output side
    logic          ofifo_full, ofifo_empty, ofifo_rd;
    logic [7:0]    ofifo_rdata;
    // PRR boundary
    logic          p_in_ready, p_out_valid, p_out_last;
    pixel_t        p_out_pix;

    prr_task_ctrl #(.AW(AW)) u_task (
      .clk, .rst_n, .sel(unit == 4'(i + 1)), .wr(host_wr), .rd(host_rd),
      .addr(host_addr[11:0]), .wdata(host_wdata),
      .rdata(tk_rdata[i]), .rvalid(tk_rvalid[i]), .done_irq(task_done[i]),
      .func, .loading, .task_start, .width, .height, .src_base, .dst_base,
      .in_count, .out_count, .writer_done
    );

    mem_reader #(.AW(AW), .FIFO_DEPTH(FIFO_DEPTH)) u_rd (
      .clk, .rst_n, .start(task_start), .base(src_base), .count(in_count), .busy(rd_busy),
      .rd_req(bank_rd_req[BIN]), .rd_addr(bank_rd_addr[BIN]),
      .rd_valid(bank_rvalid[BIN]), .rd_data(bank_rdata[BIN]),
      .fifo_count(ififo_count), .fifo_wr(ififo_wr), .fifo_wdata(ififo_wdata)
    );

    sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_ififo (
      .clk, .rst_n, .wr_en(ififo_wr), .wr_data(ififo_wdata), .full(ififo_full),
      .rd_en(ififo_rd), .rd_data(ififo_rdata), .empty(ififo_empty), .count(ififo_count)
    );

    assign ififo_rd = !ififo_empty && p_in_ready;

    prr #(.IMG_W_MAX(IMG_W_MAX)) u_prr (
      .clk, .rst_n, .cfg_loading(cfg_loading[i]), .cfg_func(cfg_func[i]),
      .func, .loading, .start(task_start), .width, .height,
      .in_valid(!ififo_empty), .in_ready(p_in_ready), .in_pix(ififo_rdata),
      .out_valid(p_out_valid), .out_ready(!ofifo_full),
      .out_pix(p_out_pix), .out_last(p_out_last)
    );

    sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_ofifo (
      .clk, .rst_n, .wr_en(p_out_valid && !ofifo_full), .wr_data(p_out_pix), .full(ofifo_full),
      .rd_en(ofifo_rd), .rd_data(ofifo_rdata), .empty(ofifo_empty), .count()
    );

    mem_writer #(.AW(AW)) u_wr (
      .clk, .rst_n, .start(task_start), .base(dst_base), .count(out_count),
      .busy(wr_busy), .done(writer_done),
      .fifo_empty(ofifo_empty), .fifo_rdata(ofifo_rdata), .fifo_rd(ofifo_rd),
      .wr_req(bank_wr_req[BOUT]), .wr_addr(bank_wr_addr[BOUT]), .wr_data(bank_wdata[BOUT])
    );

    // input bank is only read, output bank only written
    assign bank_wr_req[BIN]   = 1'b0;
    assign bank_wr_addr[BIN]  = '0;
    assign bank_wdata[BIN]    = '0;
    assign bank_rd_req[BOUT]  = 1'b0;
    assign bank_rd_addr[BOUT] = '0;

    a_last_while_writing: assert property (@(posedge clk) disable iff (!rst_n)
      (p_out_valid && p_out_last) |-> wr_busy);
    a_reader_before_writer: assert property (@(posedge clk) disable iff (!rst_n)
      writer_done |-> !rd_busy);
    a_in_fifo_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      ififo_wr |-> !ififo_full);
  end

  // banks beyond the PRRs' pairs are left idle
  for (genvar b = 2 * NUM_PRR; b < NUM_BANKS; b++) begin : g_idle_bank
    assign bank_rd_req[b]  = 1'b0;
    assign bank_rd_addr[b] = '0;
    assign bank_wr_req[b]  = 1'b0;
    assign bank_wr_addr[b] = '0;
    assign bank_wdata[b]   = '0;
  end

  // Readback data and BUSY of the ICAP are not used (write-only configuration).
  logic unused_icap;
  assign unused_icap = ^icap_o;

endmodule
