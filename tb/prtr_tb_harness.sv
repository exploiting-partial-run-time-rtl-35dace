// prtr_tb_harness: end-to-end test of prtr_top at its default parameters,
// shared by the end-to-end testbench (small images) and the full-size one.
//
// It runs the feature-extraction application on the dual-region design:
// median filtering followed by Sobel edge detection, and smoothing followed by
// Sobel, each function brought into a region by partial reconfiguration
// through the host register port and the ICAP. The host's steps are modelled
// here: images are placed into and results taken from the memory bank models
// directly, as the host link would; bitstreams are written word by word to
// the PR controller whenever its buffer reports free space.
// Sequence: configure PRR0 with median and run it on image A; while it runs,
// configure PRR1 with smoothing; run smoothing on image B and, while it runs,
// reconfigure PRR0 with Sobel and run Sobel on the median result; then
// reconfigure PRR1 with Sobel and run it on the smoothing result. Every
// result image is compared pixel by pixel with tb_ref_pkg.
// Mechanisms counted (each must happen): a start refused on a blank region,
// a partial reconfiguration, a reconfiguration finished while the other
// region was computing (configuration overlapped with execution), a full
// bitstream buffer (bitstream larger than the buffer), and each of the three
// cores used. Cycles with a full input FIFO are reported but not required:
// the cores take one pixel per cycle, as fast as the reader supplies them.
// Clocks: clk period 6, clk_icap period 18 (the 3:1 ratio of 200 and 66 MHz).
module prtr_tb_harness #(
  parameter int IMG_W   = 40,
  parameter int IMG_H   = 12,
  parameter int N_FRAME = 3000,
  parameter int MAX_CYC = 2_000_000
);
  import prtr_pkg::*;
  import tb_ref_pkg::*;

  localparam int AW = 22;

  logic        clk = 1'b0, clk_icap = 1'b0, rst_n = 1'b1, rst_icap_n = 1'b1;
  logic        host_wr = 1'b0, host_rd = 1'b0, host_rvalid, pr_done;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic [1:0]  task_done;
  logic [3:0]  bank_rd_req, bank_rvalid, bank_wr_req;
  logic [AW-1:0] bank_rd_addr [4], bank_wr_addr [4];
  logic [7:0]  bank_rdata [4], bank_wdata [4];

  int checks = 0, failures = 0;
  int n_refused = 0, n_reconfig = 0, n_overlap = 0, n_buf_full = 0, n_fifo_full = 0;
  int n_fn [4] = '{0, 0, 0, 0};

  always #3 clk = !clk;
  always #9 clk_icap = !clk_icap;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
    rst_icap_n = 1'b0;
  end

  prtr_top dut (.*);

  for (genvar b = 0; b < 4; b++) begin : g_bank
    qdr_bank_model #(.AW(AW), .LATENCY(3)) u_bank (
      .clk, .rd_req(bank_rd_req[b]), .rd_addr(bank_rd_addr[b]),
      .rd_valid(bank_rvalid[b]), .rd_data(bank_rdata[b]),
      .wr_req(bank_wr_req[b]), .wr_addr(bank_wr_addr[b]), .wr_data(bank_wdata[b]));
  end

  // cycles with a full input FIFO (reported only)
  always @(posedge clk)
    if (dut.g_prr[0].ififo_full || dut.g_prr[1].ififo_full) n_fifo_full++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // ---------------- host port ----------------
  task automatic hwrite(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    host_wr = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_wr = 1'b0;
  endtask

  task automatic hread(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    host_rd = 1'b1; host_addr = a;
    @(negedge clk);
    host_rd = 1'b0;
    d = host_rdata;
  endtask

  function automatic logic [15:0] tk(input int region, input logic [11:0] off);
    return {4'(region + 1), off};
  endfunction

  // ---------------- memory back door ----------------
  task automatic put_image(input int bank, input byte unsigned img[]);
    foreach (img[i]) begin
      case (bank)
        0: g_bank[0].u_bank.mem[i] = img[i];
        1: g_bank[1].u_bank.mem[i] = img[i];
        2: g_bank[2].u_bank.mem[i] = img[i];
        default: g_bank[3].u_bank.mem[i] = img[i];
      endcase
    end
  endtask

  task automatic get_image(input int bank, input int n, output byte unsigned img[]);
    img = new[n];
    foreach (img[i]) begin
      case (bank)
        0: img[i] = g_bank[0].u_bank.mem[i];
        1: img[i] = g_bank[1].u_bank.mem[i];
        2: img[i] = g_bank[2].u_bank.mem[i];
        default: img[i] = g_bank[3].u_bank.mem[i];
      endcase
    end
  endtask

  // ---------------- partial reconfiguration ----------------
  task automatic configure(input int region, input func_t fn, output int icap_cycles);
    byte unsigned bs[$];
    logic [31:0] st, r;
    int i = 0, free;
    bit other_busy_at_end;
    make_bitstream(region, int'(fn), N_FRAME, bs);
    while (bs.size() % 4 != 0) bs.push_front(8'hFF);
    hwrite(16'(PR_LENGTH), bs.size());
    hwrite(16'(PR_CTRL), 32'h1);
    while (i < bs.size()) begin
      hread(16'(PR_STATUS), st);
      free = int'(st[27:16]);
      if (free == 0) n_buf_full++;
      for (int k = 0; k < free && i < bs.size(); k++) begin
        hwrite(16'(PR_DATA), {bs[i+3], bs[i+2], bs[i+1], bs[i]});
        i += 4;
      end
    end
    do hread(16'(PR_STATUS), st); while (!st[1]);
    hread(tk(1 - region, TK_STATUS), r);
    other_busy_at_end = r[0];
    if (other_busy_at_end) n_overlap++;
    hwrite(16'(PR_CTRL), 32'h2);
    hread(16'(PR_CYCLES), r);
    icap_cycles = int'(r);
    check(icap_cycles >= bs.size(), "configuration takes at least one ICAP cycle per byte");
    repeat (6) @(negedge clk);   // configuration state reaches the region
    hread(tk(region, TK_STATUS), r);
    check(r[11:8] == 4'(fn) && !r[2], $sformatf("PRR%0d holds function %0d (status %h)", region, fn, r));
    n_reconfig++;
  endtask

  // ---------------- tasks ----------------
  task automatic start_task(input int region, input int w, input int h);
    hwrite(tk(region, TK_WIDTH), w);
    hwrite(tk(region, TK_HEIGHT), h);
    hwrite(tk(region, TK_SRC), 0);
    hwrite(tk(region, TK_DST), 0);
    hwrite(tk(region, TK_CTRL), 32'h3);
  endtask

  task automatic finish_task(input int region, input func_t fn, input byte unsigned src[],
                             input int w, input int h, output byte unsigned res[], output int cyc);
    logic [31:0] r;
    byte unsigned exp_q[$];
    do hread(tk(region, TK_STATUS), r); while (r[0]);
    check(r[1] && !r[3], $sformatf("PRR%0d task done", region));
    hread(tk(region, TK_CYCLES), r);
    cyc = int'(r);
    check(cyc >= w * h, "a task takes at least one cycle per input pixel");
    get_image(2 * region + 1, (w-2) * (h-2), res);
    ref_image(int'(fn), src, w, h, exp_q);
    for (int i = 0; i < exp_q.size(); i++)
      check(res[i] == exp_q[i], $sformatf("PRR%0d fn %0d pixel %0d: got %0d expected %0d",
                                          region, fn, i, res[i], exp_q[i]));
    n_fn[int'(fn)]++;
  endtask

  initial begin : watchdog
    repeat (MAX_CYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned img_a[], img_b[], med[], smo[], edge_a[], edge_b[];
    logic [31:0] r;
    int cfg_cyc, t_cyc, w2, h2;
    img_a = new[IMG_W * IMG_H];
    img_b = new[IMG_W * IMG_H];
    foreach (img_a[i]) begin
      // a smooth ramp with impulse noise: what the median stage is for
      img_a[i] = byte'(((i % IMG_W) * 3 + (i / IMG_W) * 2) % 200 + 20);
      if ($urandom_range(15) == 0) img_a[i] = ($urandom_range(1) != 0) ? 8'd255 : 8'd0;
      img_b[i] = byte'($urandom);
    end
    w2 = IMG_W - 2;
    h2 = IMG_H - 2;
    repeat (4) @(negedge clk_icap);
    rst_n = 1'b1; rst_icap_n = 1'b1;
    put_image(0, img_a);
    put_image(2, img_b);

    // a blank region refuses work
    hwrite(tk(0, TK_WIDTH), IMG_W);
    hwrite(tk(0, TK_HEIGHT), IMG_H);
    hwrite(tk(0, TK_CTRL), 32'h1);
    hread(tk(0, TK_STATUS), r);
    if (r[3] && !r[0]) n_refused++;

    configure(0, FN_MEDIAN, cfg_cyc);
    $display("partial configuration: %0d ICAP cycles", cfg_cyc);
    start_task(0, IMG_W, IMG_H);
    configure(1, FN_SMOOTH, cfg_cyc);          // overlaps the median task
    finish_task(0, FN_MEDIAN, img_a, IMG_W, IMG_H, med, t_cyc);
    $display("median task: %0d cycles for %0dx%0d", t_cyc, IMG_W, IMG_H);

    start_task(1, IMG_W, IMG_H);
    configure(0, FN_SOBEL, cfg_cyc);           // overlaps the smoothing task
    put_image(0, med);
    start_task(0, w2, h2);
    finish_task(1, FN_SMOOTH, img_b, IMG_W, IMG_H, smo, t_cyc);
    finish_task(0, FN_SOBEL, med, w2, h2, edge_a, t_cyc);

    configure(1, FN_SOBEL, cfg_cyc);
    put_image(2, smo);
    start_task(1, w2, h2);
    finish_task(1, FN_SOBEL, smo, w2, h2, edge_b, t_cyc);

    check(n_refused > 0, "start on a blank region refused");
    check(n_reconfig == 4, "four partial reconfigurations");
    check(n_overlap >= 1, "reconfiguration overlapped with a running task");
    check(n_buf_full > 0, "bitstream buffer filled up");
    check(n_fn[1] > 0 && n_fn[2] > 0 && n_fn[3] > 0, "all three cores used");
    $display("mechanisms: refused=%0d reconfig=%0d overlap=%0d buffer_full=%0d fifo_full_cycles=%0d median=%0d sobel=%0d smooth=%0d",
             n_refused, n_reconfig, n_overlap, n_buf_full, n_fifo_full, n_fn[1], n_fn[2], n_fn[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
