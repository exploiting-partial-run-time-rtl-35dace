// tb_prtr_top: end-to-end testbench of prtr_top with small images (160 x 100)
// and 3 KB bitstreams; see prtr_tb_harness for the sequence and the checks.
module tb_prtr_top;
  prtr_tb_harness #(.IMG_W(160), .IMG_H(100), .N_FRAME(3000), .MAX_CYC(2_000_000)) u_harness ();
endmodule
