// sobel_filter: Sobel edge-detection core, one of the hardware functions
// loaded into a partially reconfigurable region.
//
// Each output pixel is the gradient magnitude |gx| + |gy| of the 3x3
// neighbourhood of an interior input pixel, with the usual Sobel kernels
// (gx: right column minus left column, weights 1 2 1; gy: bottom row minus
// top row), saturated to 8 bits. The document names the core and its role
// (edge extraction after noise reduction); the kernels, the magnitude
// approximation and the saturation are this design's choices.
//
// Stream interface (shared by all cores that fit a PRR): pixels in raster
// order on in_valid/in_ready, results on out_valid/out_ready, out_last with
// the final result. start (one cycle, before the first pixel) clears the
// core. width/height must stay stable during a frame. A w x h image gives
// (w-2) x (h-2) results, one per interior pixel, also in raster order.
// Timing: one result per cycle when neither side stalls; a result leaves two
// cycles after the pixel that completes its window (window stage, then the
// output register). The whole pipeline stalls while out_valid && !out_ready.
module sobel_filter
  import prtr_pkg::*;
#(
  parameter int unsigned IMG_W_MAX = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
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

  pixel_t win [3][3];
  logic   win_valid, win_last, en;
  pixel_t result;

  // Global stall: the pipeline moves when the output register is free.
  assign en       = !out_valid || out_ready;
  assign in_ready = en;

  window3x3 #(.IMG_W_MAX(IMG_W_MAX)) u_win (
    .clk, .rst_n, .clear(start), .width, .height, .en,
    .in_valid, .in_pix, .win_valid, .win_last, .win
  );

  // Horizontal and vertical Sobel gradients; the magnitude is approximated
  // by |gx| + |gy| and saturated to 255.
  always_comb begin
    logic signed [11:0] gx, gy;
    logic        [11:0] ax, ay;
    logic        [12:0] mag;
    gx = 12'(win[0][2]) + 12'({win[1][2], 1'b0}) + 12'(win[2][2])
       - 12'(win[0][0]) - 12'({win[1][0], 1'b0}) - 12'(win[2][0]);
    gy = 12'(win[2][0]) + 12'({win[2][1], 1'b0}) + 12'(win[2][2])
       - 12'(win[0][0]) - 12'({win[0][1], 1'b0}) - 12'(win[0][2]);
    ax  = gx[11] ? 12'(-gx) : 12'(gx);
    ay  = gy[11] ? 12'(-gy) : 12'(gy);
    mag = 13'(ax) + 13'(ay);
    result = (mag > 13'd255) ? 8'd255 : mag[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_last  <= 1'b0;
    end else if (start) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else if (en) begin
      out_valid <= win_valid;
      out_last  <= win_last;
      if (win_valid) out_pix <= result;
    end
  end

endmodule
