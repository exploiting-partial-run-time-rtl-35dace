// tb_pr_addr_decoder: self-checking testbench of the PR unit's address
// decoder. Every write strobe must fire only for its own offset with sel
// high, and reads must return the matching register one cycle later (zero
// for unmapped offsets, no rvalid without sel).
module tb_pr_addr_decoder;
  import prtr_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1, sel = 1'b0, wr = 1'b0, rd = 1'b0;
  logic [11:0] addr = '0;
  logic        ctrl_we, length_we, data_we, rvalid;
  logic [31:0] length_q = 32'h1111_0001, status_q = 32'h2222_0002, cycles_q = 32'h3333_0003, rdata;
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  // reset asserted with an edge at the start, so asynchronous resets act at once
  initial begin
    #1;
    rst_n = 1'b0;
  end
  pr_addr_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_r;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      sel  = $urandom_range(3) != 0;
      wr   = $urandom_range(1);
      rd   = !wr;
      addr = (n < 200) ? 12'(4 * $urandom_range(0, 6)) : 12'($urandom);
      length_q = $urandom; status_q = $urandom; cycles_q = $urandom;
      #1;
      check(ctrl_we   == (sel && wr && addr == 12'h000), "ctrl_we");
      check(length_we == (sel && wr && addr == 12'h004), "length_we");
      check(data_we   == (sel && wr && addr == 12'h00C), "data_we");
      case (addr)
        12'h004: exp_r = length_q;
        12'h008: exp_r = status_q;
        12'h010: exp_r = cycles_q;
        default: exp_r = '0;
      endcase
      @(negedge clk);
      check(rvalid == (sel && rd), "rvalid");
      if (rvalid) check(rdata == exp_r, $sformatf("read of %h", addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
