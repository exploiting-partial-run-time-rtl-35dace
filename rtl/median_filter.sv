// median_filter: 3x3 median noise-reduction core, one of the hardware
// functions loaded into a partially reconfigurable region.
//
// Each output pixel is the median of the 3x3 neighbourhood of an interior
// input pixel, which removes impulse noise before edge detection. The
// document names the core and its role (noise reduction ahead of Sobel edge
// detection); the 3x3 window, the sorting network and the border rule are
// this design's choices.
//
// Stream interface (shared by all cores that fit a PRR): pixels in raster
// order on in_valid/in_ready, results on out_valid/out_ready, out_last with
// the final result. start (one cycle, before the first pixel) clears the
// core. width/height must stay stable during a frame. A w x h image gives
// (w-2) x (h-2) results, one per interior pixel, also in raster order.
// Timing: one result per cycle when neither side stalls; a result leaves two
// cycles after the pixel that completes its window (window stage, then the
// output register). The whole pipeline stalls while out_valid && !out_ready.
module median_filter
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

  // Sorting network over the nine window pixels (odd-even transposition,
  // nine passes); the fifth smallest is the median.
  always_comb begin
    pixel_t v [9];
    pixel_t t;
    t = '0;
    for (int i = 0; i < 9; i++) v[i] = win[i/3][i%3];
    for (int p = 0; p < 9; p++) begin
      for (int i = 0; i < 8; i++) begin
        if ((i % 2) == (p % 2) && v[i] > v[i+1]) begin
          t      = v[i];
          v[i]   = v[i+1];
          v[i+1] = t;
        end
      end
    end
    result = v[4];
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
