// tb_fsl_fifo: self-checking test of one FSL link. It checks that the link is
// empty after reset, that a written word is visible one cycle later, that
// full rises after exactly DEPTH words and that words come out in order with
// their control bits, under random write and read traffic against a
// reference queue.
module tb_fsl_fifo;
  import mpsoc_pkg::*;

  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  fsl_wr_t wr;
  logic full, rd_en;
  fsl_rd_t rd;
  int checks = 0, failures = 0;

  fsl_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr, .full, .rd_en, .rd);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FSL_W:0] q[$];

  initial begin
    wr = '0; rd_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!rd.exists && !full, "empty after reset");

    // latency: write one word, visible next cycle
    wr = '{write: 1, ctrl: 1, data: 32'hCAFE_0001};
    @(posedge clk); #1;
    wr = '0;
    check(rd.exists && rd.ctrl && rd.data == 32'hCAFE_0001, "word visible one cycle after write");
    rd_en = 1; @(posedge clk); #1; rd_en = 0;
    check(!rd.exists, "empty after pop");

    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      check(!full, "not full before DEPTH words");
      wr = '{write: 1, ctrl: 0, data: 32'h100 + i};
      @(posedge clk); #1;
    end
    wr = '0;
    check(full, "full after DEPTH words");
    for (int i = 0; i < DEPTH; i++) begin
      check(rd.exists && rd.data == 32'h100 + i, "drain order");
      rd_en = 1; @(posedge clk); #1;
    end
    rd_en = 0;
    check(!rd.exists && !full, "empty after drain");

    // random traffic
    for (int t = 0; t < 5000; t++) begin
      logic [FSL_W:0] w;
      w = {1'($urandom), 32'($urandom)};
      wr = '0; rd_en = 0;
      if (!full && ($urandom % 3 != 0)) begin
        wr = '{write: 1, ctrl: w[FSL_W], data: w[FSL_W-1:0]};
      end
      if (rd.exists && ($urandom % 3 != 0)) begin
        rd_en = 1;
        check(q.size() > 0 && {rd.ctrl, rd.data} == q[0], "random order");
        if (q.size() > 0) void'(q.pop_front());
      end
      if (wr.write) q.push_back(w);
      @(posedge clk); #1;
      check(rd.exists == (q.size() > 0), "exists matches occupancy");
      check(full == (q.size() == DEPTH), "full matches occupancy");
    end
    wr = '0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
