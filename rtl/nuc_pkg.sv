// Shared constants and types of the non-uniformity-correction (NUC) stream
// accelerator. Pixels from the infrared sensor are unsigned 16-bit words;
// Gaussian weights are unsigned fixed point with WFRAC fraction bits, so a
// weight of 1.0 is 1 << WFRAC. The stream bus towards the DMA is 32 bits wide,
// following the "prefer 32-bit variables" rule of the fixed-point algorithm.
// The register map of the AXI4-Lite port and the engine modes are defined
// here as well; both are choices of this implementation.
package nuc_pkg;

  localparam int unsigned PIX_W  = 16;   // sensor pixel width
  localparam int unsigned WGT_W  = 18;   // Gaussian weight width (fits a DSP 18-bit port)
  localparam int unsigned WFRAC  = 16;   // weight fraction bits, 1.0 = 65536
  localparam int unsigned GUARD  = 4;    // extra fraction bits kept between row and column pass
  localparam int unsigned AXIS_W = 32;   // stream data width
  localparam int unsigned OFS_W  = 16;   // DeStrip row/column offset width (signed)

  // Engine selected by the CTRL register for the next frame.
  typedef enum logic [2:0] {
    MODE_BLUR    = 3'd0,  // Gaussian blur only
    MODE_DENU    = 3'd1,  // pixel - blur(pixel), signed
    MODE_DENU_AB = 3'd2,  // |pixel - blur(pixel)|
    MODE_STRIP   = 3'd3,  // DeStrip row/column offset restore
    MODE_SHIFT   = 3'd4,  // left shift + frame average
    MODE_DENOISE = 3'd5   // routed to the external DeNoise core
  } mode_e;

  // Operation of the DeNU engine (sub-set of the modes above).
  typedef enum logic [1:0] {
    DENU_BLUR = 2'd0,
    DENU_SUB  = 2'd1,
    DENU_ABS  = 2'd2
  } denu_op_e;

  // AXI4-Lite register map (byte addresses).
  localparam logic [15:0] REG_CTRL    = 16'h0000; // [2:0] mode
  localparam logic [15:0] REG_WIDTH   = 16'h0004; // image width in pixels
  localparam logic [15:0] REG_HEIGHT  = 16'h0008; // image height in rows
  localparam logic [15:0] REG_SHIFT   = 16'h000C; // left shift of the shift/average engine
  localparam logic [15:0] REG_SIGMA   = 16'h0010; // sigmaN handed to the DeNoise core
  localparam logic [15:0] REG_STATUS  = 16'h0014; // [0] irq pending (write 1 to clear), [1] busy
  localparam logic [15:0] REG_IRQ_EN  = 16'h0018; // [0] interrupt enable
  localparam logic [15:0] REG_MEAN    = 16'h001C; // frame average of the last shift/average frame
  localparam logic [15:0] REG_FRAMES  = 16'h0020; // frames completed (read only)
  localparam logic [15:0] BASE_WGT    = 16'h0100; // Gaussian weights, index = (addr-base)/4
  localparam logic [15:0] BASE_COL    = 16'h2000; // DeStrip column offsets
  localparam logic [15:0] BASE_ROW    = 16'h4000; // DeStrip row offsets
  localparam logic [15:0] BASE_END    = 16'h6000;

  // Reflect-101 border (OpenCV default): index -1 maps to 1, n maps to n-2.
  function automatic int mirror_idx(input int i, input int n);
    if (i < 0)      return -i;
    else if (i > n - 1) return 2 * (n - 1) - i;
    else            return i;
  endfunction

endpackage
