// prtr_pkg: types and constants shared by the partially reconfigurable
// image-processing platform.
//
// It holds the identifiers of the hardware functions that can be loaded into
// a partially reconfigurable region (PRR), the host register map, and the
// framing of the simplified partial bitstream understood by the ICAP model.
// The three functions (median, Sobel, smoothing) follow the application of
// the design; the numeric codes, register offsets and bitstream framing are
// this design's own choices.
package prtr_pkg;

  typedef logic [7:0] pixel_t;

  // Function held by a PRR. FN_BLANK is the state after power-up: the region
  // holds no core and its output stream stays idle.
  typedef enum logic [3:0] {
    FN_BLANK  = 4'd0,
    FN_MEDIAN = 4'd1,
    FN_SOBEL  = 4'd2,
    FN_SMOOTH = 4'd3
  } func_t;

  // Host address map (byte addresses, 32-bit registers).
  // addr[15:12] selects the unit: 0 = PR controller, 1 + i = PRR i.
  localparam int unsigned UNIT_SHIFT = 12;

  // PR controller registers
  localparam logic [11:0] PR_CTRL   = 12'h000; // W: bit0 start, bit1 clear done
  localparam logic [11:0] PR_LENGTH = 12'h004; // RW: partial bitstream length in bytes
  localparam logic [11:0] PR_STATUS = 12'h008; // R: bit0 busy, bit1 done, [27:16] free words
  localparam logic [11:0] PR_DATA   = 12'h00C; // W: four bitstream bytes, byte 0 in [7:0]
  localparam logic [11:0] PR_CYCLES = 12'h010; // R: clk_icap cycles of the last configuration

  // PRR task registers
  localparam logic [11:0] TK_CTRL   = 12'h000; // W: bit0 start, bit1 clear done
  localparam logic [11:0] TK_STATUS = 12'h004; // R: bit0 busy, bit1 done, bit2 reconfiguring, [11:8] function
  localparam logic [11:0] TK_WIDTH  = 12'h008; // RW: image width in pixels
  localparam logic [11:0] TK_HEIGHT = 12'h00C; // RW: image height in pixels
  localparam logic [11:0] TK_SRC    = 12'h010; // RW: first pixel address in the input bank
  localparam logic [11:0] TK_DST    = 12'h014; // RW: first pixel address in the output bank
  localparam logic [11:0] TK_CYCLES = 12'h018; // R: clk cycles of the last task

  // Simplified partial bitstream: the Virtex sync word, then one byte with
  // the target region, one byte with the function code, then frame bytes.
  localparam logic [31:0] SYNC_WORD = 32'hAA99_5566;

  // Output of a 3x3 core for an image of w x h pixels: the (w-2) x (h-2)
  // interior pixels whose window lies fully inside the image.
  function automatic logic [31:0] interior_pixels(input logic [15:0] w, input logic [15:0] h);
    return (w < 3 || h < 3) ? 32'd0 : 32'((w - 16'd2)) * 32'((h - 16'd2));
  endfunction

endpackage
