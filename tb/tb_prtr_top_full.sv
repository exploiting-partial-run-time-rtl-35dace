// tb_prtr_top_full: full-size run of prtr_top at its default parameters:
// 2048 x 2048 images (4 MB, one local memory bank each) and partial
// bitstreams of 404,168 bytes, the size of a dual-layout region's bitstream.
// See prtr_tb_harness for the sequence and the checks.
module tb_prtr_top_full;
  prtr_tb_harness #(.IMG_W(2048), .IMG_H(2048), .N_FRAME(404152), .MAX_CYC(60_000_000)) u_harness ();
endmodule
