// frame_grabber: the video input of one processing node. It captures one
// rectangular window of every frame on the video bus into a double buffer
// and lets the node's processor read the last complete window at leisure.
//
// Capture: every bus beat whose (x, y) lies in_win the active window
// (x0 <= x < x0+width, y0 <= y < y0+height) is written to the input buffer at
// the next free address, so the window is stored row by row, packed, starting
// at address 0. Pixels beyond BUF_PIXELS are dropped and counted as clipped.
// V_Sync comes with the last beat of a frame; that beat is still captured,
// and at the end of its cycle the input and output buffers swap, the write address
// returns to 0, a window written on the configuration port since the last
// V_Sync becomes active, and the event port pulses evt_frame for one cycle
// with the number of pixels now held in the output buffer (evt_pixels) and
// whether any were clipped (evt_clipped). The processor reads the output
// buffer on the dedicated video memory port: vm_data holds the pixel at
// vm_addr one cycle after vm_en. The double buffer, the V_Sync swap and the
// configuration, event and video-memory ports follow the published architecture; the
// window semantics, the deferral of a new window to the frame boundary and
// the event contents are this design's choices.
module frame_grabber
  import mpsoc_pkg::*;
#(
  parameter int BUF_PIXELS = 65536,
  parameter int DEF_W      = 256,
  parameter int DEF_H      = 256,
  localparam int AW        = $clog2(BUF_PIXELS)
) (
  input  logic        clk,
  input  logic        rst_n,
  // video bus tap
  input  video_beat_t vb,
  input  logic        vb_vsync,
  // configuration port
  input  logic        cfg_valid,
  input  window_t     cfg_win,
  // event port
  output logic        evt_frame,
  output logic [AW:0] evt_pixels,
  output logic        evt_clipped,
  // dedicated video memory port
  input  logic        vm_en,
  input  logic [AW-1:0] vm_addr,
  output pixel_t      vm_data
);

  pixel_t mem [2*BUF_PIXELS];

  logic    in_bank;
  logic [AW:0] wr_cnt;         // pixels of the window seen in this frame
  logic    clipped;
  window_t win, pend;
  logic    pend_valid;
  logic    in_win, wr_ok, clip_next;
  logic [AW:0] cnt_next;

  assign in_win = vb.valid &&
                  (vb.x >= win.x0) && ({1'b0, vb.x} < {1'b0, win.x0} + {1'b0, win.width}) &&
                  (vb.y >= win.y0) && ({1'b0, vb.y} < {1'b0, win.y0} + {1'b0, win.height});

  // bank b occupies b*BUF_PIXELS .. b*BUF_PIXELS+BUF_PIXELS-1
  localparam int MAW = $clog2(2 * BUF_PIXELS);
  logic [MAW-1:0] wr_addr, rd_addr;
  assign wr_addr = (in_bank ? MAW'(BUF_PIXELS) : '0) + MAW'(wr_cnt[AW-1:0]);
  assign rd_addr = (in_bank ? '0 : MAW'(BUF_PIXELS)) + MAW'(vm_addr);

  assign wr_ok     = in_win && (wr_cnt < (AW+1)'(BUF_PIXELS));
  assign cnt_next  = wr_cnt + (AW+1)'(wr_ok);
  assign clip_next = clipped || (in_win && !wr_ok);

  always_ff @(posedge clk) begin
    if (wr_ok) mem[wr_addr] <= vb.pixel;
    if (vm_en) vm_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_bank     <= 1'b0;
      wr_cnt      <= '0;
      clipped     <= 1'b0;
      win         <= '{x0: '0, y0: '0, width: coord_t'(DEF_W), height: coord_t'(DEF_H)};
      pend        <= '0;
      pend_valid  <= 1'b0;
      evt_frame   <= 1'b0;
      evt_pixels  <= '0;
      evt_clipped <= 1'b0;
    end else begin
      evt_frame <= 1'b0;
      if (cfg_valid) begin
        pend       <= cfg_win;
        pend_valid <= 1'b1;
      end
      if (vb_vsync) begin
        in_bank     <= ~in_bank;
        wr_cnt      <= '0;
        clipped     <= 1'b0;
        evt_frame   <= 1'b1;
        evt_pixels  <= cnt_next;
        evt_clipped <= clip_next;
        if (pend_valid && !cfg_valid) begin
          win        <= pend;
          pend_valid <= 1'b0;
        end
      end else begin
        wr_cnt  <= cnt_next;
        clipped <= clip_next;
      end
    end
  end

endmodule
