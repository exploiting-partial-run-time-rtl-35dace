// window3x3: raster-scan 3x3 neighbourhood generator shared by the image cores.
//
// Pixels arrive one per accepted cycle in raster order (row by row, left to
// right). Two line buffers of IMG_W_MAX pixels keep the two previous rows;
// three column shift registers hold the current 3x3 window. After a pixel at
// column x, row y has been accepted, win[r][c] holds the input pixel at row
// y-2+r, column x-2+c, so the window is centred on (x-1, y-1). The window is
// marked valid only when it lies wholly inside the image (x >= 2 and y >= 2),
// so a w x h image yields (w-2) x (h-2) windows; win_last marks the window of
// the image's last pixel.
//
// Timing: one pipeline stage. Registers advance only when en is high; a pixel
// is accepted when en && in_valid, and the window it completes appears on win
// with win_valid one cycle later. clear (a pulse at task start) resets the
// pixel coordinates. The document names the filter cores only; this window
// structure and its border rule (interior pixels only) are this design's.
// The line buffers are plain arrays with an asynchronous read, which maps to
// distributed RAM, matching the cores using no block RAM.
module window3x3
  import prtr_pkg::*;
#(
  parameter int unsigned IMG_W_MAX = 2048,
  localparam int unsigned XW = $clog2(IMG_W_MAX)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [15:0] width,
  input  logic [15:0] height,
  input  logic        en,
  input  logic        in_valid,
  input  pixel_t      in_pix,
  output logic        win_valid,
  output logic        win_last,
  output pixel_t      win [3][3]
);

  pixel_t      lb0 [IMG_W_MAX];   // row y-1
  pixel_t      lb1 [IMG_W_MAX];   // row y-2
  logic [XW-1:0] x;
  logic [15:0]   y;
  logic          accept;
  logic          at_row_end;

  assign accept     = en && in_valid;
  assign at_row_end = (16'(x) == width - 16'd1);

  always_ff @(posedge clk) begin
    if (accept) begin
      lb0[x] <= in_pix;
      lb1[x] <= lb0[x];
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= lb1[x];
      win[1][2] <= lb0[x];
      win[2][2] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else if (clear) begin
      x         <= '0;
      y         <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else if (en) begin
      win_valid <= accept && (x >= XW'(2)) && (y >= 16'd2);
      win_last  <= accept && at_row_end && (y == height - 16'd1);
      if (accept) begin
        if (at_row_end) begin
          x <= '0;
          y <= y + 16'd1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

endmodule
