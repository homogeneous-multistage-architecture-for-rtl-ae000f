// tb_local_memory: self-checking test of a node's local memory at its full
// 64 KB size. It writes through both ports with random byte enables, reads
// back through both ports against a reference model, and checks the one-cycle
// read latency, the read-first behaviour and the top and bottom words.
module tb_local_memory;
  import mpsoc_pkg::*;

  localparam int BYTES = 65536;
  localparam int WORDS = BYTES / 4;
  localparam int AW = $clog2(WORDS);

  logic clk = 0;
  logic a_en, b_en;
  logic [3:0] a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  local_memory #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [logic [AW-1:0]];

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw, input logic [3:0] we);
    for (int i = 0; i < 4; i++) if (we[i]) old[8*i +: 8] = nw[8*i +: 8];
    return old;
  endfunction

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(negedge clk);
    // initialise a set of addresses through port A, including the extremes
    for (int i = 0; i < 512; i++) begin
      logic [AW-1:0] ad;
      ad = (i == 0) ? '0 : (i == 1) ? '1 : AW'($urandom);
      a_en = 1; a_we = 4'hF; a_addr = ad; a_wdata = $urandom;
      ref_mem[ad] = a_wdata;
      @(negedge clk);
    end
    a_en = 0; a_we = 0;
    // byte-enable writes through port B, then check read-first and readback on A
    foreach (ref_mem[ad]) begin
      logic [31:0] old;
      old = ref_mem[ad];
      b_en = 1; b_we = 4'($urandom); b_addr = ad; b_wdata = $urandom;
      ref_mem[ad] = merge(old, b_wdata, b_we);
      @(negedge clk);
      check(b_rdata == old, "read-first data on a write cycle");
      b_en = 0; b_we = 0;
      a_en = 1; a_addr = ad;
      @(negedge clk);
      check(a_rdata == ref_mem[ad], "port A reads back merged bytes");
      a_en = 0;
    end
    // both ports reading in the same cycle
    foreach (ref_mem[ad]) begin
      a_en = 1; b_en = 1; a_addr = ad; b_addr = ~ad;
      @(negedge clk);
      check(a_rdata == ref_mem[ad], "simultaneous read on A");
      if (ref_mem.exists(~ad)) check(b_rdata == ref_mem[~ad], "simultaneous read on B");
    end
    a_en = 0; b_en = 0;
    // read data holds while the port is disabled
    a_en = 1; a_addr = '0; @(negedge clk); a_en = 0; a_addr = '1; @(negedge clk);
    check(a_rdata == ref_mem['0], "output holds while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
