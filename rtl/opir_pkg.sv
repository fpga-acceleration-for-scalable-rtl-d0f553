// opir_pkg: types and constants shared by the OPIR subframe preprocessing kernel.
//
// The kernel turns raw 16-bit infrared pixels into the signed 8-bit inputs of a
// quantized segmentation network. It works on 128x128 subframes, 32 pixels at a
// time. Those three numbers (16-bit input, INT8 output, 32 parallel elements)
// and the subframe size come from the published pipeline; the fixed-point
// format of the normalization constants, the AXI widths and the register map are
// this design's own choices and are collected here.
package opir_pkg;

  // Published sizes.
  localparam int unsigned PIX_W     = 16;   // raw OPIR pixel width
  localparam int unsigned OUT_W     = 8;    // normalized INT8 output
  localparam int unsigned LANES     = 32;   // elements processed per cycle
  localparam int unsigned SUBFRAME  = 128;  // S, subframe edge in pixels
  localparam int unsigned OVERLAP   = 3;    // delta, overlap between subframes

  // Design choices.
  localparam int unsigned INV_W     = 24;   // inverse-std width, unsigned
  localparam int unsigned INV_FRAC  = 20;   // fraction bits of inverse std
  localparam int unsigned FIXPOS_W  = 4;    // DPU input fix position 0..15
  localparam int unsigned AXI_ADDR_W = 64;
  localparam int unsigned AXI_DATA_W = LANES * PIX_W;   // 512: one input vector per beat
  localparam int unsigned LEN_W      = 32;  // element count register width

  // Normalization constants: y = sat8(round((x - mean) * inv_std * 2^fix_pos)).
  typedef struct packed {
    logic [PIX_W-1:0]    mean;
    logic [INV_W-1:0]    inv_std;   // unsigned, INV_FRAC fraction bits
    logic [FIXPOS_W-1:0] fix_pos;   // power-of-two DPU input gain
  } norm_cfg_t;

  // One kernel call.
  typedef struct packed {
    logic [AXI_ADDR_W-1:0] src_addr;  // byte address of raw pixels, 64-byte aligned
    logic [AXI_ADDR_W-1:0] dst_addr;  // byte address of INT8 result, 64-byte aligned
    logic [LEN_W-1:0]      n_elem;    // number of pixels, multiple of 2*LANES
    norm_cfg_t             norm;
  } job_t;

  // AXI4-Lite register map (byte offsets).
  localparam logic [7:0] REG_CTRL    = 8'h00;  // [0] start (W1S), [1] done (RC), [2] idle, [3] error (RC)
  localparam logic [7:0] REG_IER     = 8'h04;  // [0] interrupt enable on done
  localparam logic [7:0] REG_SRC_LO  = 8'h10;
  localparam logic [7:0] REG_SRC_HI  = 8'h14;
  localparam logic [7:0] REG_DST_LO  = 8'h18;
  localparam logic [7:0] REG_DST_HI  = 8'h1C;
  localparam logic [7:0] REG_NELEM   = 8'h20;
  localparam logic [7:0] REG_MEAN    = 8'h24;
  localparam logic [7:0] REG_INVSTD  = 8'h28;
  localparam logic [7:0] REG_FIXPOS  = 8'h2C;

  // Number of SxS subframes covering an FxF frame with overlap d:
  // ceil((F - S) / (S - d) + 1) squared.
  function automatic int unsigned subframes_per_frame(int unsigned f,
                                                      int unsigned s = SUBFRAME,
                                                      int unsigned d = OVERLAP);
    int unsigned step, n;
    if (f <= s) return 1;
    step = s - d;
    n = (f - s + step - 1) / step + 1;
    return n * n;
  endfunction

endpackage
