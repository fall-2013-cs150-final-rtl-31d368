// dog_pkg: types and constants shared by the difference-of-Gaussians
// video pipeline and its frame-buffer subsystem.
//
// Image geometry: the source frame is 800x600 8-bit grey pixels. The
// filter stage works on the 2x down-sampled 400x300 image. Frame buffers
// in the external SRAM hold 32-bit words, four pixels each, so one frame
// takes 120,000 words; two frames (front and back) are kept.
// A write request on an SRAM arbiter port is {addr, data, byte mask}.
package dog_pkg;

  localparam int unsigned PIX_W      = 8;
  localparam int unsigned IMG_W      = 800;
  localparam int unsigned IMG_H      = 600;
  localparam int unsigned SRAM_AW    = 18;
  localparam int unsigned SRAM_DW    = 32;
  localparam int unsigned SRAM_MW    = SRAM_DW / 8;
  localparam int unsigned PIX_PER_WORD = SRAM_DW / PIX_W;

  typedef logic [PIX_W-1:0] pixel_t;

  // Output selection of the Gaussian wrapper (DIP switches 2..4).
  typedef enum logic [1:0] {
    SEL_G1   = 2'd0,  // image after one Gaussian filter
    SEL_G2   = 2'd1,  // image after two cascaded Gaussian filters
    SEL_DOG  = 2'd2   // difference of the two
  } dog_sel_e;

  // Write request to an SRAM arbiter port.
  typedef struct packed {
    logic [SRAM_AW-1:0] addr;
    logic [SRAM_DW-1:0] data;
    logic [SRAM_MW-1:0] mask;   // 1 = write this byte
  } sram_wreq_t;

  // States of the SRAM arbiter (five-state Moore machine).
  typedef enum logic [2:0] {
    ARB_IDLE = 3'd0,
    ARB_W0   = 3'd1,
    ARB_W1   = 3'd2,
    ARB_R0   = 3'd3,
    ARB_R1   = 3'd4
  } arb_state_e;

  // States of the swap controller.
  typedef enum logic [2:0] {
    SW_IDLE     = 3'd0,
    SW_BG_START = 3'd1,
    SW_BG_WAIT  = 3'd2,
    SW_OL_START = 3'd3,
    SW_OL_WAIT  = 3'd4,
    SW_SWAP     = 3'd5
  } swap_state_e;

endpackage
