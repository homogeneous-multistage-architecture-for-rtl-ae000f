// local_memory: the private block-RAM memory (M) of one processing node,
// holding that node's program and data; 64 KB as in the original FPGA build.
//
// Two independent synchronous ports, one for instruction fetch (port A) and
// one for data access (port B), each 32 bits wide with byte write enables.
// A read returns the addressed word one cycle after en is high; a write
// stores the enabled bytes at the clock edge and the read data of that cycle
// shows the old word (read-first). Addresses are word addresses. The size
// follows the published architecture; the dual-port organisation, the byte enables and the
// read-first behaviour are this design's choices. The contents are not reset.
module local_memory
  import mpsoc_pkg::*;
#(
  parameter int BYTES = 65536,
  localparam int WORDS = BYTES / 4,
  localparam int AW    = $clog2(WORDS)
) (
  input  logic             clk,
  // port A (instruction side)
  input  logic             a_en,
  input  logic [3:0]       a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [FSL_W-1:0] a_wdata,
  output logic [FSL_W-1:0] a_rdata,
  // port B (data side)
  input  logic             b_en,
  input  logic [3:0]       b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [FSL_W-1:0] b_wdata,
  output logic [FSL_W-1:0] b_rdata
);

  logic [FSL_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      for (int i = 0; i < 4; i++)
        if (b_we[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
    end
  end

endmodule
