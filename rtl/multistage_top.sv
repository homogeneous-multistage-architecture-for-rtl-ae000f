// multistage_top: the homogeneous multistage processor array for real-time
// image processing, in its two-stage form with FSL point-to-point links.
//
// Frames from the host arrive as FSL words (gen_wr/gen_full, see
// frame_generator for the word format) through an FSL link into the frame
// generator, which double-buffers each frame and streams it onto the video
// bus. The bus broadcasts every pixel, tagged with its position, to the
// frame grabbers of all nodes of both stages; each grabber keeps its own
// window of the frame for its processor. Stage 1 has 2^D1 nodes and stage 2
// has 2^D2 nodes, each stage a hypercube of bidirectional FIFO links, and
// node j of stage 1 feeds node j of stage 2 through a one-way inter-stage
// FIFO for every j present in both stages. In the intended use, stage 1
// recognises the right roadside and stage 2 the left one, each node of a
// stage evaluating one hypothesis, with node 0 distributing the road model
// and collecting the scores over the hypercube links.
//
// The processors, the host's Ethernet receiver and the display are not part
// of this module: every port a processor would use is brought out, named
// s1_* for stage 1 and s2_* for stage 2 with the meaning given in
// hypercube_stage, plus the inter-stage ports s1_is_* (stage-1 producers)
// and s2_is_* (stage-2 consumers). All logic runs on one clock with an
// asynchronous active-low reset. Node counts, 64 KB memories, the 256 x 256
// frame size and the topology follow the published architecture; FIFO depths, widths and
// the port protocol are this design's choices.
module multistage_top
  import mpsoc_pkg::*;
#(
  parameter int D1          = 3,
  parameter int D2          = 3,
  parameter int FRAME_W     = 256,
  parameter int FRAME_H     = 256,
  parameter int FIFO_DEPTH  = 16,
  parameter int MEM_BYTES   = 65536,
  parameter int BUF_PIXELS  = 65536,
  localparam int N1         = 1 << D1,
  localparam int N2         = 1 << D2,
  localparam int DL1        = (D1 > 0) ? D1 : 1,
  localparam int DL2        = (D2 > 0) ? D2 : 1,
  localparam int NL         = (N1 < N2) ? N1 : N2,
  localparam int MAW        = $clog2(MEM_BYTES / 4),
  localparam int GAW        = $clog2(BUF_PIXELS)
) (
  input  logic    clk,
  input  logic    rst_n,
  // frame input from the host (FSL producer side)
  input  fsl_wr_t gen_wr,
  output logic    gen_full,
  output logic    gen_v_swap,
  output logic    gen_stall,
  input  fsl_wr_t [N1-1:0][DL1-1:0]            s1_hc_wr,
  output logic    [N1-1:0][DL1-1:0]            s1_hc_full,
  input  logic    [N1-1:0][DL1-1:0]            s1_hc_rd_en,
  output fsl_rd_t [N1-1:0][DL1-1:0]            s1_hc_rd,
  input  logic    [N1-1:0]                     s1_ma_en,
  input  logic    [N1-1:0][3:0]                s1_ma_we,
  input  logic    [N1-1:0][MAW-1:0]            s1_ma_addr,
  input  logic    [N1-1:0][FSL_W-1:0]          s1_ma_wdata,
  output logic    [N1-1:0][FSL_W-1:0]          s1_ma_rdata,
  input  logic    [N1-1:0]                     s1_mb_en,
  input  logic    [N1-1:0][3:0]                s1_mb_we,
  input  logic    [N1-1:0][MAW-1:0]            s1_mb_addr,
  input  logic    [N1-1:0][FSL_W-1:0]          s1_mb_wdata,
  output logic    [N1-1:0][FSL_W-1:0]          s1_mb_rdata,
  input  logic    [N1-1:0]                     s1_cfg_valid,
  input  window_t [N1-1:0]                     s1_cfg_win,
  output logic    [N1-1:0]                     s1_evt_frame,
  output logic    [N1-1:0][GAW:0]              s1_evt_pixels,
  output logic    [N1-1:0]                     s1_evt_clipped,
  input  logic    [N1-1:0]                     s1_vm_en,
  input  logic    [N1-1:0][GAW-1:0]            s1_vm_addr,
  output pixel_t  [N1-1:0]                     s1_vm_data,
  input  fsl_wr_t [N2-1:0][DL2-1:0]            s2_hc_wr,
  output logic    [N2-1:0][DL2-1:0]            s2_hc_full,
  input  logic    [N2-1:0][DL2-1:0]            s2_hc_rd_en,
  output fsl_rd_t [N2-1:0][DL2-1:0]            s2_hc_rd,
  input  logic    [N2-1:0]                     s2_ma_en,
  input  logic    [N2-1:0][3:0]                s2_ma_we,
  input  logic    [N2-1:0][MAW-1:0]            s2_ma_addr,
  input  logic    [N2-1:0][FSL_W-1:0]          s2_ma_wdata,
  output logic    [N2-1:0][FSL_W-1:0]          s2_ma_rdata,
  input  logic    [N2-1:0]                     s2_mb_en,
  input  logic    [N2-1:0][3:0]                s2_mb_we,
  input  logic    [N2-1:0][MAW-1:0]            s2_mb_addr,
  input  logic    [N2-1:0][FSL_W-1:0]          s2_mb_wdata,
  output logic    [N2-1:0][FSL_W-1:0]          s2_mb_rdata,
  input  logic    [N2-1:0]                     s2_cfg_valid,
  input  window_t [N2-1:0]                     s2_cfg_win,
  output logic    [N2-1:0]                     s2_evt_frame,
  output logic    [N2-1:0][GAW:0]              s2_evt_pixels,
  output logic    [N2-1:0]                     s2_evt_clipped,
  input  logic    [N2-1:0]                     s2_vm_en,
  input  logic    [N2-1:0][GAW-1:0]            s2_vm_addr,
  output pixel_t  [N2-1:0]                     s2_vm_data,
  input  fsl_wr_t [NL-1:0]                 s1_is_wr,
  output logic    [NL-1:0]                 s1_is_full,
  input  logic    [NL-1:0]                 s2_is_rd_en,
  output fsl_rd_t [NL-1:0]                 s2_is_rd,
  output logic                             is_busy
);

  // host link into the frame generator
  logic    gen_rd_en;
  fsl_rd_t gen_rd;

  fsl_fifo #(.DEPTH(FIFO_DEPTH)) u_host_link (
    .clk, .rst_n,
    .wr(gen_wr), .full(gen_full),
    .rd_en(gen_rd_en), .rd(gen_rd)
  );

  logic   px_valid, px_sof;
  pixel_t px;

  frame_generator #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_gen (
    .clk, .rst_n,
    .in_rd_en(gen_rd_en), .in_rd(gen_rd),
    .out_valid(px_valid), .out_sof(px_sof), .out_pixel(px),
    .v_swap(gen_v_swap), .in_stall(gen_stall)
  );

  video_beat_t vb_tap  [2];
  logic        vb_vsync[2];

  // one tap per stage; within a stage the tap is shared by all grabbers
  video_bus #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .NUM_TAPS(2)) u_bus (
    .clk, .rst_n,
    .in_valid(px_valid), .in_sof(px_sof), .in_pixel(px),
    .tap(vb_tap), .tap_vsync(vb_vsync)
  );

  hypercube_stage #(
    .D(D1), .FIFO_DEPTH(FIFO_DEPTH), .MEM_BYTES(MEM_BYTES),
    .BUF_PIXELS(BUF_PIXELS), .DEF_W(FRAME_W), .DEF_H(FRAME_H)
  ) u_stage1 (
    .clk, .rst_n,
    .hc_wr(s1_hc_wr),
    .hc_full(s1_hc_full),
    .hc_rd_en(s1_hc_rd_en),
    .hc_rd(s1_hc_rd),
    .ma_en(s1_ma_en),
    .ma_we(s1_ma_we),
    .ma_addr(s1_ma_addr),
    .ma_wdata(s1_ma_wdata),
    .ma_rdata(s1_ma_rdata),
    .mb_en(s1_mb_en),
    .mb_we(s1_mb_we),
    .mb_addr(s1_mb_addr),
    .mb_wdata(s1_mb_wdata),
    .mb_rdata(s1_mb_rdata),
    .cfg_valid(s1_cfg_valid),
    .cfg_win(s1_cfg_win),
    .evt_frame(s1_evt_frame),
    .evt_pixels(s1_evt_pixels),
    .evt_clipped(s1_evt_clipped),
    .vm_en(s1_vm_en),
    .vm_addr(s1_vm_addr),
    .vm_data(s1_vm_data),
    .vb(vb_tap[0]), .vb_vsync(vb_vsync[0])
  );

  hypercube_stage #(
    .D(D2), .FIFO_DEPTH(FIFO_DEPTH), .MEM_BYTES(MEM_BYTES),
    .BUF_PIXELS(BUF_PIXELS), .DEF_W(FRAME_W), .DEF_H(FRAME_H)
  ) u_stage2 (
    .clk, .rst_n,
    .hc_wr(s2_hc_wr),
    .hc_full(s2_hc_full),
    .hc_rd_en(s2_hc_rd_en),
    .hc_rd(s2_hc_rd),
    .ma_en(s2_ma_en),
    .ma_we(s2_ma_we),
    .ma_addr(s2_ma_addr),
    .ma_wdata(s2_ma_wdata),
    .ma_rdata(s2_ma_rdata),
    .mb_en(s2_mb_en),
    .mb_we(s2_mb_we),
    .mb_addr(s2_mb_addr),
    .mb_wdata(s2_mb_wdata),
    .mb_rdata(s2_mb_rdata),
    .cfg_valid(s2_cfg_valid),
    .cfg_win(s2_cfg_win),
    .evt_frame(s2_evt_frame),
    .evt_pixels(s2_evt_pixels),
    .evt_clipped(s2_evt_clipped),
    .vm_en(s2_vm_en),
    .vm_addr(s2_vm_addr),
    .vm_data(s2_vm_data),
    .vb(vb_tap[1]), .vb_vsync(vb_vsync[1])
  );

  interstage_links #(.N_LINKS(NL), .DEPTH(FIFO_DEPTH)) u_links (
    .clk, .rst_n,
    .up_wr(s1_is_wr), .up_full(s1_is_full),
    .dn_rd_en(s2_is_rd_en), .dn_rd(s2_is_rd),
    .busy(is_busy)
  );

endmodule
