// tb_prtr_top_single: end-to-end test of prtr_top in the single-region layout
// (NUM_PRR = 1), with partial bitstreams of the single-region size, 887784
// bytes.
//
// With one region there is nothing to overlap a configuration with, so the
// functions of the application run one after the other. The sequence is:
// configure median, run it on image A, reconfigure to smoothing and run it on
// image B, then reconfigure to Sobel and run it on both filtered images.
// Half-way through every configuration the testbench tries to start a task.
// The region is being rewritten at that moment, so the start must be refused.
// Every result is compared with tb_ref_pkg. The host is modelled as in
// prtr_tb_harness: images are placed into and taken from the bank models
// directly, and bitstream words are written whenever the buffer has room.
// Mechanisms counted (each must happen): a start refused on the blank
// region, a start refused while loading, three reconfigurations, a full
// bitstream buffer, and each of the three cores used. ICAP cycles per
// configuration are checked against the one-byte-per-cycle rate: with the
// buffer filled before the start, exactly LENGTH + 1.
// The image is 512 x 512 to keep the run short; the 2048 x 2048 image is
// covered by the full-size dual-region test, and the data path is the same.
// Clocks: clk period 6, clk_icap period 18, as in prtr_tb_harness.
module tb_prtr_top_single;
  import prtr_pkg::*;
  import tb_ref_pkg::*;

  localparam int AW      = 22;
  localparam int IMG_W   = 512;
  localparam int IMG_H   = 512;
  localparam int BS_LEN  = 887784;
  localparam int MAX_CYC = 30_000_000;

  logic        clk = 1'b0, clk_icap = 1'b0, rst_n = 1'b1, rst_icap_n = 1'b1;
  logic        host_wr = 1'b0, host_rd = 1'b0, host_rvalid, pr_done;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic [0:0]  task_done;
  logic [3:0]  bank_rd_req, bank_rvalid, bank_wr_req;
  logic [AW-1:0] bank_rd_addr [4], bank_wr_addr [4];
  logic [7:0]  bank_rdata [4], bank_wdata [4];

  int checks = 0, failures = 0;
  int n_refused_blank = 0, n_refused_loading = 0, n_reconfig = 0, n_buf_full = 0;
  int n_fn [4] = '{0, 0, 0, 0};

  always #3 clk = !clk;
  always #9 clk_icap = !clk_icap;

  initial begin
    #1;
    rst_n = 1'b0;
    rst_icap_n = 1'b0;
  end

  prtr_top #(.NUM_PRR(1)) dut (.*);

  for (genvar b = 0; b < 2; b++) begin : g_bank
    qdr_bank_model #(.AW(AW), .LATENCY(3)) u_bank (
      .clk, .rd_req(bank_rd_req[b]), .rd_addr(bank_rd_addr[b]),
      .rd_valid(bank_rvalid[b]), .rd_data(bank_rdata[b]),
      .wr_req(bank_wr_req[b]), .wr_addr(bank_wr_addr[b]), .wr_data(bank_wdata[b]));
  end
  assign bank_rvalid[3:2] = '0;
  assign bank_rdata[2] = '0;
  assign bank_rdata[3] = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

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

  localparam logic [15:0] TK = 16'h1000;   // task registers of region 0

  // try a start and count it if the region refuses it
  task automatic try_start(output bit refused);
    logic [31:0] r;
    hwrite(TK | 16'(TK_WIDTH), IMG_W);
    hwrite(TK | 16'(TK_HEIGHT), IMG_H);
    hwrite(TK | 16'(TK_CTRL), 32'h1);
    hread(TK | 16'(TK_STATUS), r);
    refused = r[3] && !r[0];
    hwrite(TK | 16'(TK_CTRL), 32'h2);      // clear the error bit
  endtask

  task automatic configure(input func_t fn);
    byte unsigned bs[$];
    logic [31:0] st, r;
    int i = 0, free;
    bit tried = 1'b0, refused;
    make_bitstream(0, int'(fn), BS_LEN - 16, bs);
    check(bs.size() == BS_LEN, "bitstream has the single-region size");
    hwrite(16'(PR_LENGTH), bs.size());
    // fill the buffer before the start, so the ICAP never waits for data and
    // the configuration must take exactly LENGTH + 1 ICAP cycles
    hread(16'(PR_STATUS), st);
    for (int k = 0; k < int'(st[27:16]); k++) begin
      hwrite(16'(PR_DATA), {bs[i+3], bs[i+2], bs[i+1], bs[i]});
      i += 4;
    end
    hwrite(16'(PR_CTRL), 32'h1);
    while (i < bs.size()) begin
      hread(16'(PR_STATUS), st);
      free = int'(st[27:16]);
      if (free == 0) n_buf_full++;
      for (int k = 0; k < free && i < bs.size(); k++) begin
        hwrite(16'(PR_DATA), {bs[i+3], bs[i+2], bs[i+1], bs[i]});
        i += 4;
      end
      // half-way through, the region is being rewritten: a start must fail
      if (!tried && i > bs.size() / 2) begin
        tried = 1'b1;
        try_start(refused);
        if (refused) n_refused_loading++;
        check(refused, "start refused while the region is loading");
      end
    end
    do hread(16'(PR_STATUS), st); while (!st[1]);
    hwrite(16'(PR_CTRL), 32'h2);
    hread(16'(PR_CYCLES), r);
    check(int'(r) == bs.size() + 1, $sformatf("configuration took %0d ICAP cycles, expected %0d",
                                              r, bs.size() + 1));
    repeat (6) @(negedge clk);
    hread(TK | 16'(TK_STATUS), r);
    check(r[11:8] == 4'(fn) && !r[2], $sformatf("region holds function %0d (status %h)", fn, r));
    n_reconfig++;
  endtask

  task automatic run(input func_t fn, const ref byte unsigned src[], input int w, input int h,
                     output byte unsigned res[]);
    logic [31:0] r;
    byte unsigned exp_q[$];
    foreach (src[i]) g_bank[0].u_bank.mem[i] = src[i];
    hwrite(TK | 16'(TK_WIDTH), w);
    hwrite(TK | 16'(TK_HEIGHT), h);
    hwrite(TK | 16'(TK_SRC), 0);
    hwrite(TK | 16'(TK_DST), 0);
    hwrite(TK | 16'(TK_CTRL), 32'h3);
    do hread(TK | 16'(TK_STATUS), r); while (r[0]);
    check(r[1] && !r[3], "task done");
    hread(TK | 16'(TK_CYCLES), r);
    check(int'(r) >= w * h, "a task takes at least one cycle per input pixel");
    res = new[(w - 2) * (h - 2)];
    foreach (res[i]) res[i] = g_bank[1].u_bank.mem[i];
    ref_image(int'(fn), src, w, h, exp_q);
    for (int i = 0; i < exp_q.size(); i++)
      check(res[i] == exp_q[i], $sformatf("fn %0d pixel %0d: got %0d expected %0d",
                                          fn, i, res[i], exp_q[i]));
    n_fn[int'(fn)]++;
    $display("function %0d: %0d cycles for %0dx%0d", fn, r, w, h);
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
    bit refused;
    img_a = new[IMG_W * IMG_H];
    img_b = new[IMG_W * IMG_H];
    foreach (img_a[i]) begin
      img_a[i] = byte'(((i % IMG_W) * 3 + (i / IMG_W) * 2) % 200 + 20);
      if ($urandom_range(15) == 0) img_a[i] = ($urandom_range(1) != 0) ? 8'd255 : 8'd0;
      img_b[i] = byte'($urandom);
    end
    repeat (4) @(negedge clk_icap);
    rst_n = 1'b1; rst_icap_n = 1'b1;

    try_start(refused);
    if (refused) n_refused_blank++;

    configure(FN_MEDIAN);
    run(FN_MEDIAN, img_a, IMG_W, IMG_H, med);
    configure(FN_SMOOTH);
    run(FN_SMOOTH, img_b, IMG_W, IMG_H, smo);
    configure(FN_SOBEL);
    run(FN_SOBEL, med, IMG_W - 2, IMG_H - 2, edge_a);
    run(FN_SOBEL, smo, IMG_W - 2, IMG_H - 2, edge_b);

    check(n_refused_blank > 0, "start on the blank region refused");
    check(n_refused_loading == 3, "start refused during each of the three configurations");
    check(n_reconfig == 3, "three partial reconfigurations");
    check(n_buf_full > 0, "bitstream buffer filled up");
    check(n_fn[1] > 0 && n_fn[2] > 0 && n_fn[3] > 0, "all three cores used");
    $display("mechanisms: refused_blank=%0d refused_loading=%0d reconfig=%0d buffer_full=%0d median=%0d sobel=%0d smooth=%0d",
             n_refused_blank, n_refused_loading, n_reconfig, n_buf_full, n_fn[1], n_fn[2], n_fn[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
