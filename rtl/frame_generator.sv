// frame_generator: turns frames that arrive as FSL words (from the Ethernet
// receiver) into a pixel stream for the video bus, through a double buffer.
//
// Words are read from the FSL consumer port into the input buffer; each word
// holds four 8-bit pixels in raster order, pixel 0 in bits 7:0. A word with
// the control bit set starts a new frame (the write pointer returns to 0), so
// a sender can always resynchronise. When the input buffer holds a full
// FRAME_W x FRAME_H frame and the output side is idle, the two buffers swap
// (V_Swap, reported by v_swap for one cycle) and the output side streams the
// new frame, one pixel per cycle, on out_valid/out_pixel with out_sof on the
// first pixel; the input side meanwhile fills the other buffer. While a full
// input frame waits for the output side the FSL is not read, so the sender is
// held back by the link's full flag (the stall is reported on in_stall).
// Latency: the first pixel is on out_valid three cycles after v_swap.
// The published architecture gives the two buffers, the V_Swap and the 256 x 256 frame
// size; the packing of pixels into words, the meaning of the control bit
// and the one-pixel-per-cycle bus rate are this design's choices.
module frame_generator
  import mpsoc_pkg::*;
#(
  parameter int FRAME_W = 256,
  parameter int FRAME_H = 256,
  localparam int PIXELS = FRAME_W * FRAME_H,
  localparam int WPF    = PIXELS / 4,          // FSL words per frame
  localparam int WAW    = $clog2(WPF),
  localparam int PAW    = $clog2(PIXELS)
) (
  input  logic    clk,
  input  logic    rst_n,
  // FSL input (consumer side)
  output logic    in_rd_en,
  input  fsl_rd_t in_rd,
  // pixel stream to the video bus
  output logic    out_valid,
  output logic    out_sof,
  output pixel_t  out_pixel,
  // status
  output logic    v_swap,
  output logic    in_stall
);

  logic [FSL_W-1:0] mem [2*WPF];

  logic           in_bank;        // buffer being filled; the other is streamed
  logic [WAW:0]   in_cnt;         // words of the current input frame
  logic           in_done;
  logic           out_busy;
  logic [PAW-1:0] out_cnt;        // next pixel to read
  logic           rd_valid, rd_sof;
  logic [1:0]     rd_sel;
  logic [FSL_W-1:0] rd_word;
  logic           swap;

  assign in_done  = (in_cnt == (WAW+1)'(WPF));
  assign in_rd_en = in_rd.exists && !in_done;
  assign in_stall = in_rd.exists && in_done;
  assign swap     = in_done && !out_busy;
  assign v_swap   = swap;

  // input side: the word address is 0 for a control word, else the count
  logic [WAW-1:0] waddr;
  assign waddr = in_rd.ctrl ? '0 : in_cnt[WAW-1:0];

  // bank b occupies words b*WPF .. b*WPF+WPF-1 (WPF need not be a power of 2)
  localparam int MAW = $clog2(2 * WPF);
  logic [MAW-1:0] wr_word, rd_word_addr;
  assign wr_word      = (in_bank ? MAW'(WPF) : '0) + MAW'(waddr);
  assign rd_word_addr = (in_bank ? '0 : MAW'(WPF)) + MAW'(out_cnt[PAW-1:2]);

  always_ff @(posedge clk) begin
    if (in_rd_en) mem[wr_word] <= in_rd.data;
    if (out_busy) rd_word <= mem[rd_word_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_bank  <= 1'b0;
      in_cnt   <= '0;
      out_busy <= 1'b0;
      out_cnt  <= '0;
      rd_valid <= 1'b0;
      rd_sof   <= 1'b0;
      rd_sel   <= '0;
    end else begin
      if (swap) begin
        in_bank  <= ~in_bank;
        in_cnt   <= '0;
        out_busy <= 1'b1;
        out_cnt  <= '0;
      end else begin
        if (in_rd_en) in_cnt <= (WAW+1)'(waddr) + 1'b1;
        if (out_busy) begin
          out_cnt <= out_cnt + 1'b1;
          if (out_cnt == PAW'(PIXELS - 1)) out_busy <= 1'b0;
        end
      end
      rd_valid <= out_busy;
      rd_sof   <= out_busy && (out_cnt == '0);
      rd_sel   <= out_cnt[1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_pixel <= '0;
    end else begin
      out_valid <= rd_valid;
      out_sof   <= rd_sof;
      out_pixel <= rd_word[8*rd_sel +: 8];
    end
  end

  initial assert (PIXELS % 4 == 0) else $error("frame size must be a multiple of 4 pixels");

endmodule
