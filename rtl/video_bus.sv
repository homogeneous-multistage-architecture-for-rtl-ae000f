// video_bus: carries the frame generator's pixel stream to every frame
// grabber of every stage, and gives each pixel its place in the frame so that
// each grabber can cut out its own block of the image.
//
// Each input pixel (in_valid/in_pixel, in_sof on the first pixel of a frame)
// is registered and broadcast on all NUM_TAPS outputs as a video_beat_t with
// its column x and row y, counted in raster order over a FRAME_W x FRAME_H
// frame (in_sof forces the position back to 0,0). Together with the beat of
// the last pixel of a frame, vsync is high for one cycle on every tap: this is
// the V_Sync on which the grabbers swap their buffers, so the next frame may
// follow with no idle cycle. Latency is one cycle.
// The published architecture names the bus and says that it splits the image into blocks
// for the processors; the coordinate tagging and the vsync pulse are this
// design's way of doing that.
module video_bus
  import mpsoc_pkg::*;
#(
  parameter int FRAME_W  = 256,
  parameter int FRAME_H  = 256,
  parameter int NUM_TAPS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sof,
  input  pixel_t      in_pixel,
  output video_beat_t tap      [NUM_TAPS],
  output logic        tap_vsync[NUM_TAPS]
);

  coord_t      nx, ny;       // position of the next pixel
  coord_t      cx, cy;       // position of the current input pixel
  video_beat_t beat;
  logic        vsync;

  assign cx = in_sof ? '0 : nx;
  assign cy = in_sof ? '0 : ny;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nx     <= '0;
      ny     <= '0;
      beat   <= '0;
      vsync  <= 1'b0;
    end else begin
      beat.valid <= in_valid;
      beat.x     <= cx;
      beat.y     <= cy;
      beat.pixel <= in_pixel;
      vsync      <= in_valid && (cx == coord_t'(FRAME_W - 1)) && (cy == coord_t'(FRAME_H - 1));
      if (in_valid) begin
        if (cx == coord_t'(FRAME_W - 1)) begin
          nx <= '0;
          ny <= (cy == coord_t'(FRAME_H - 1)) ? '0 : cy + 1'b1;
        end else begin
          nx <= cx + 1'b1;
          ny <= cy;
        end
      end
    end
  end

  for (genvar t = 0; t < NUM_TAPS; t++) begin : g_tap
    assign tap[t]       = beat;
    assign tap_vsync[t] = vsync;
  end

endmodule
