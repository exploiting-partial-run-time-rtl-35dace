// prr: one partially reconfigurable region (PRR) with the cores that can be
// configured into it.
//
// On the FPGA a PRR is a rectangular area whose logic is replaced by a
// partial bitstream while the static region and the other PRRs keep running;
// its ports cross the region boundary through fixed bus macros. In RTL the
// region is modelled, as is usual for simulating partial reconfiguration, by
// instantiating every core that may be loaded and letting the configuration
// state select the one that is present. The cores are the document's (median,
// Sobel, smoothing); the selection mechanism is a model of reconfiguration.
//
// cfg_loading and cfg_func come from the configuration plane (ICAP clock
// domain). cfg_loading is synchronised; while it is high the region holds
// no working core: all cores are held in reset and both stream ports are
// idle, so the static region sees a quiet boundary. cfg_func is captured
// only when the synchronised cfg_loading falls (it is stable by then), so
// the function changes only at the end of a configuration. With FN_BLANK
// (power-up) the region accepts no input. func and loading report the state
// to the task registers.
// Stream ports: the same valid/ready pixel streams and start/width/height as
// the cores; see median_filter for their timing.
module prr
  import prtr_pkg::*;
#(
  parameter int unsigned IMG_W_MAX = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_loading,
  input  func_t       cfg_func,
  output func_t       func,
  output logic        loading,
  input  logic        start,
  input  logic [15:0] width,
  input  logic [15:0] height,
  input  logic        in_valid,
  output logic        in_ready,
  input  pixel_t      in_pix,
  output logic        out_valid,
  input  logic        out_ready,
  output pixel_t      out_pix,
  output logic        out_last
);

  logic   loading_d, core_rst_n;
  logic   [2:0] c_in_ready, c_out_valid, c_out_last, c_sel;
  pixel_t c_out_pix [3];

  cdc_sync u_load_sync (.clk, .rst_n, .d(cfg_loading), .q(loading));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loading_d <= 1'b0;
      func      <= FN_BLANK;
    end else begin
      loading_d <= loading;
      if (loading)                 func <= FN_BLANK;
      else if (loading_d)          func <= cfg_func;
    end
  end

  assign core_rst_n = rst_n && !loading;
  assign c_sel = {func == FN_SMOOTH, func == FN_SOBEL, func == FN_MEDIAN};

  median_filter #(.IMG_W_MAX(IMG_W_MAX)) u_median (
    .clk, .rst_n(core_rst_n), .start, .width, .height,
    .in_valid(in_valid && c_sel[0]), .in_ready(c_in_ready[0]), .in_pix,
    .out_valid(c_out_valid[0]), .out_ready(out_ready && c_sel[0]),
    .out_pix(c_out_pix[0]), .out_last(c_out_last[0])
  );

  sobel_filter #(.IMG_W_MAX(IMG_W_MAX)) u_sobel (
    .clk, .rst_n(core_rst_n), .start, .width, .height,
    .in_valid(in_valid && c_sel[1]), .in_ready(c_in_ready[1]), .in_pix,
    .out_valid(c_out_valid[1]), .out_ready(out_ready && c_sel[1]),
    .out_pix(c_out_pix[1]), .out_last(c_out_last[1])
  );

  smoothing_filter #(.IMG_W_MAX(IMG_W_MAX)) u_smooth (
    .clk, .rst_n(core_rst_n), .start, .width, .height,
    .in_valid(in_valid && c_sel[2]), .in_ready(c_in_ready[2]), .in_pix,
    .out_valid(c_out_valid[2]), .out_ready(out_ready && c_sel[2]),
    .out_pix(c_out_pix[2]), .out_last(c_out_last[2])
  );

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_last  = 1'b0;
    out_pix   = '0;
    for (int i = 0; i < 3; i++) begin
      if (c_sel[i]) begin
        in_ready  = c_in_ready[i];
        out_valid = c_out_valid[i];
        out_last  = c_out_last[i];
        out_pix   = c_out_pix[i];
      end
    end
  end

endmodule
