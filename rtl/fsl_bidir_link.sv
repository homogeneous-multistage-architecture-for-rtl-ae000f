// fsl_bidir_link: the bidirectional link between two neighbouring nodes of a
// hypercube stage, built from two FSL FIFOs running in opposite directions
// (end A to end B and end B to end A).
//
// Each end has a producer port (wr/full) into the FIFO towards the other end
// and a consumer port (rd_en/rd) on the FIFO coming from it; timing is that
// of fsl_fifo (one cycle from write to visibility). The published architecture draws these
// links as "bidirectional FIFO links"; building them from two one-way FSLs
// follows the FSL being unidirectional, and the depth is this design's choice.
module fsl_bidir_link
  import mpsoc_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // end A
  input  fsl_wr_t a_wr,
  output logic    a_full,
  input  logic    a_rd_en,
  output fsl_rd_t a_rd,
  // end B
  input  fsl_wr_t b_wr,
  output logic    b_full,
  input  logic    b_rd_en,
  output fsl_rd_t b_rd
);

  fsl_fifo #(.DEPTH(DEPTH)) u_a2b (
    .clk, .rst_n,
    .wr(a_wr), .full(a_full),
    .rd_en(b_rd_en), .rd(b_rd)
  );

  fsl_fifo #(.DEPTH(DEPTH)) u_b2a (
    .clk, .rst_n,
    .wr(b_wr), .full(b_full),
    .rd_en(a_rd_en), .rd(a_rd)
  );

endmodule
