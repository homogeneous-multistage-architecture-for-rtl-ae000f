// hypercube_stage: one pipeline stage of the multistage architecture, made
// of N = 2^D identical processing nodes. Each node owns a private local
// memory and a frame grabber on the video bus; its processor (a soft core
// outside this module) connects to the memory, the grabber and the node's
// links through this module's ports. Node n is joined to each node n ^ 2^d
// (d = 0..D-1) by a bidirectional FIFO link, which makes the stage a static
// D-dimensional hypercube: every node has exactly D links, and a message
// between any two nodes needs at most D hops, forwarded by the processors.
//
// Port arrays are indexed [node][dimension] for links and [node] otherwise.
// For node n and dimension d, hc_wr/hc_full write into the link towards
// n ^ 2^d and hc_rd_en/hc_rd read what that neighbour sent; see fsl_fifo for
// timing. Memory ports a (instruction) and b (data) are those of
// local_memory; cfg/evt/vm ports are those of frame_grabber. The hypercube
// topology, node count, private memory and per-node frame grabber follow
// the published architecture; link depth and port organisation are this design's choices.
module hypercube_stage
  import mpsoc_pkg::*;
#(
  parameter int D          = 3,
  parameter int FIFO_DEPTH = 16,
  parameter int MEM_BYTES  = 65536,
  parameter int BUF_PIXELS = 65536,
  parameter int DEF_W      = 256,
  parameter int DEF_H      = 256,
  localparam int N         = 1 << D,
  localparam int DL        = (D > 0) ? D : 1,
  localparam int MAW       = $clog2(MEM_BYTES / 4),
  localparam int GAW       = $clog2(BUF_PIXELS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // hypercube links, processor side
  input  fsl_wr_t [N-1:0][DL-1:0]    hc_wr,
  output logic    [N-1:0][DL-1:0]    hc_full,
  input  logic    [N-1:0][DL-1:0]    hc_rd_en,
  output fsl_rd_t [N-1:0][DL-1:0]    hc_rd,
  // local memories
  input  logic    [N-1:0]            ma_en,
  input  logic    [N-1:0][3:0]       ma_we,
  input  logic    [N-1:0][MAW-1:0]   ma_addr,
  input  logic    [N-1:0][FSL_W-1:0] ma_wdata,
  output logic    [N-1:0][FSL_W-1:0] ma_rdata,
  input  logic    [N-1:0]            mb_en,
  input  logic    [N-1:0][3:0]       mb_we,
  input  logic    [N-1:0][MAW-1:0]   mb_addr,
  input  logic    [N-1:0][FSL_W-1:0] mb_wdata,
  output logic    [N-1:0][FSL_W-1:0] mb_rdata,
  // video bus
  input  video_beat_t                vb,
  input  logic                       vb_vsync,
  // frame grabbers
  input  logic    [N-1:0]            cfg_valid,
  input  window_t [N-1:0]            cfg_win,
  output logic    [N-1:0]            evt_frame,
  output logic    [N-1:0][GAW:0]     evt_pixels,
  output logic    [N-1:0]            evt_clipped,
  input  logic    [N-1:0]            vm_en,
  input  logic    [N-1:0][GAW-1:0]   vm_addr,
  output pixel_t  [N-1:0]            vm_data
);

  for (genvar n = 0; n < N; n++) begin : g_node
    local_memory #(.BYTES(MEM_BYTES)) u_mem (
      .clk,
      .a_en(ma_en[n]), .a_we(ma_we[n]), .a_addr(ma_addr[n]), .a_wdata(ma_wdata[n]), .a_rdata(ma_rdata[n]),
      .b_en(mb_en[n]), .b_we(mb_we[n]), .b_addr(mb_addr[n]), .b_wdata(mb_wdata[n]), .b_rdata(mb_rdata[n])
    );

    frame_grabber #(.BUF_PIXELS(BUF_PIXELS), .DEF_W(DEF_W), .DEF_H(DEF_H)) u_grab (
      .clk, .rst_n,
      .vb, .vb_vsync,
      .cfg_valid(cfg_valid[n]), .cfg_win(cfg_win[n]),
      .evt_frame(evt_frame[n]), .evt_pixels(evt_pixels[n]), .evt_clipped(evt_clipped[n]),
      .vm_en(vm_en[n]), .vm_addr(vm_addr[n]), .vm_data(vm_data[n])
    );

    // one link per dimension, owned by the node whose bit d is 0 (end A)
    for (genvar d = 0; d < D; d++) begin : g_dim
      if (((n >> d) & 1) == 0) begin : g_link
        localparam int M = n | (1 << d);
        fsl_bidir_link #(.DEPTH(FIFO_DEPTH)) u_link (
          .clk, .rst_n,
          .a_wr(hc_wr[n][d]), .a_full(hc_full[n][d]), .a_rd_en(hc_rd_en[n][d]), .a_rd(hc_rd[n][d]),
          .b_wr(hc_wr[M][d]), .b_full(hc_full[M][d]), .b_rd_en(hc_rd_en[M][d]), .b_rd(hc_rd[M][d])
        );
      end
    end

    if (D == 0) begin : g_nolink
      assign hc_full[n] = '1;
      assign hc_rd[n]   = '0;
    end
  end

endmodule
