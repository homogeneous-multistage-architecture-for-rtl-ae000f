// mpsoc_pkg: types and constants shared by the multistage processor array.
//
// The processing nodes are 32-bit soft processors, so every FSL (Fast Simplex
// Link) FIFO carries a 32-bit data word plus one control bit that marks
// special words (the control bit follows the usual FSL convention; the
// published architecture gives only "FIFO link"). Pixels are 8-bit grey levels, and frame
// coordinates are carried with COORD_W bits, enough for frames up to
// 4095 x 4095 pixels.
package mpsoc_pkg;

  localparam int FSL_W   = 32;
  localparam int PIX_W   = 8;
  localparam int COORD_W = 12;

  typedef logic [PIX_W-1:0]   pixel_t;
  typedef logic [COORD_W-1:0] coord_t;

  // Producer side of an FSL link: a write strobe with its word.
  typedef struct packed {
    logic             write;
    logic             ctrl;
    logic [FSL_W-1:0] data;
  } fsl_wr_t;

  // Consumer side of an FSL link: the word at the head of the FIFO,
  // valid while exists is high (first-word fall-through).
  typedef struct packed {
    logic             exists;
    logic             ctrl;
    logic [FSL_W-1:0] data;
  } fsl_rd_t;

  // One beat of the video bus: a pixel with its position in the frame.
  typedef struct packed {
    logic   valid;
    coord_t x;
    coord_t y;
    pixel_t pixel;
  } video_beat_t;

  // Capture window of a frame grabber (configuration port).
  typedef struct packed {
    coord_t x0;
    coord_t y0;
    coord_t width;
    coord_t height;
  } window_t;

endpackage
