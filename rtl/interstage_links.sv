// interstage_links: the synchronisation links between two consecutive
// pipeline stages. Processor j of the upstream stage sends to processor j of
// the downstream stage over a unidirectional FSL FIFO, for every j that
// exists in both stages (N_LINKS = the smaller stage size); nothing flows
// back, so an upstream processor can send its output but never receives from
// the next stage.
//
// Link j has the upstream producer port up_wr[j]/up_full[j] and the
// downstream consumer port dn_rd_en[j]/dn_rd[j], with fsl_fifo timing. A
// one-word summary of the bank, busy, is high while any link holds data.
// The pairing rule and the one-way direction follow the published architecture; the depth
// is this design's choice.
module interstage_links
  import mpsoc_pkg::*;
#(
  parameter int N_LINKS = 8,
  parameter int DEPTH   = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fsl_wr_t [N_LINKS-1:0] up_wr,
  output logic    [N_LINKS-1:0] up_full,
  input  logic    [N_LINKS-1:0] dn_rd_en,
  output fsl_rd_t [N_LINKS-1:0] dn_rd,
  output logic                busy
);

  logic [N_LINKS-1:0] exists;

  for (genvar j = 0; j < N_LINKS; j++) begin : g_link
    fsl_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr(up_wr[j]), .full(up_full[j]),
      .rd_en(dn_rd_en[j]), .rd(dn_rd[j])
    );
    assign exists[j] = dn_rd[j].exists;
  end

  assign busy = |exists;

endmodule
