// rf_pkg: sizes, number formats and the host address map shared by the
// resistive-fuse segmentation engine.
//
// The engine smooths a 64x64 grey-level image with a digital emulation of a
// resistive-fuse network. Input pixels I_n are 8-bit unsigned integers. Node
// values O_n carry FRAC_W extra fraction bits so that small per-iteration
// corrections are not lost to rounding. Both look-up tables are addressed by a
// 9-bit two's-complement difference of integer pixel values and return a
// signed current in the same fixed-point scale as O_n (LSB = 2^-FRAC_W).
//
// The 64x64 image size and the 40 MHz / 20 ms frame budget come from the
// system description; word widths, the address map and the iteration count
// are choices of this design.
package rf_pkg;

  // Image geometry.
  localparam int unsigned IMG_W   = 64;
  localparam int unsigned IMG_H   = 64;
  localparam int unsigned PIX_W   = 8;   // input pixel bits (I_n)
  localparam int unsigned FRAC_W  = 4;   // fraction bits kept in O_n
  localparam int unsigned NODE_W  = PIX_W + FRAC_W;
  localparam int unsigned LUT_AW  = PIX_W + 1;  // signed pixel difference
  localparam int unsigned LUT_W   = 12;  // signed LUT output (current)

  // One pixel update takes this many clock cycles (see rf_controller).
  localparam int unsigned CYCLES_PER_PIXEL = 8;

  // Default number of network update sweeps per frame: the largest count for
  // which one 64x64 frame (copy pass plus sweeps) fits into 20 ms at 40 MHz.
  localparam int unsigned DEFAULT_ITERS = 24;

  // Neighbour order used by the datapath and the controller.
  typedef enum logic [1:0] {
    NB_UP    = 2'd0,
    NB_DOWN  = 2'd1,
    NB_LEFT  = 2'd2,
    NB_RIGHT = 2'd3
  } nbr_e;

  // Host address map (word addresses, 16-bit host address bus).
  //   0x0000-0x0FFF  source memory, write (pixel I_n at y*64+x)
  //   0x1000-0x1FFF  destination memory, read (O_n, integer part in [11:4])
  //   0x2000-0x21FF  LUT_1, write (index = signed difference, two's complement)
  //   0x2200-0x23FF  LUT_2, write
  //   0x3000         control, write: bit0 start, bit1 copy source to destination first
  //   0x3001         iteration count, read/write
  //   0x3002         status, read: bit0 busy, bit1 done (sticky until next start)
  //   0x3003         cycle count of the last run, read
  localparam logic [15:0] A_SRC_BASE  = 16'h0000;
  localparam logic [15:0] A_DST_BASE  = 16'h1000;
  localparam logic [15:0] A_LUT1_BASE = 16'h2000;
  localparam logic [15:0] A_LUT2_BASE = 16'h2200;
  localparam logic [15:0] A_CTRL      = 16'h3000;
  localparam logic [15:0] A_ITERS     = 16'h3001;
  localparam logic [15:0] A_STATUS    = 16'h3002;
  localparam logic [15:0] A_CYCLES    = 16'h3003;

endpackage
