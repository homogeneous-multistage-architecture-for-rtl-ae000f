// fsl_fifo: one unidirectional Fast Simplex Link (FSL), the point-to-point
// FIFO channel that joins neighbouring processors inside a stage and
// processor j of one stage to processor j of the next.
//
// The producer writes a word (32-bit data plus a control bit) by raising
// wr.write for one cycle while full is low; a write while full is dropped,
// as on an FSL, and an assertion flags it. The consumer sees the head word on
// rd with rd.exists high (first-word fall-through) and pops it by raising
// rd_en. A word written in cycle t is visible to the consumer in cycle t+1.
// The published architecture specifies the link only as a unidirectional FIFO; the depth
// (16 words, the customary FSL default), the fall-through read and the
// control bit are this design's choices.
module fsl_fifo
  import mpsoc_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // producer (master) side
  input  fsl_wr_t wr,
  output logic    full,
  // consumer (slave) side
  input  logic    rd_en,
  output fsl_rd_t rd
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [FSL_W:0] mem [DEPTH];
  logic [AW-1:0]  wptr, rptr;
  logic [AW:0]    count;

  logic do_wr, do_rd;
  assign do_wr = wr.write && !full;
  assign do_rd = rd_en && (count != '0);

  assign full      = (count == (AW+1)'(DEPTH));
  assign rd.exists = (count != '0);
  assign {rd.ctrl, rd.data} = mem[rptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= {wr.ctrl, wr.data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // A producer must not write into a full link, nor a consumer pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr.write && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && !rd.exists));

endmodule
