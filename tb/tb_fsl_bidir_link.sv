// tb_fsl_bidir_link: self-checking test of a bidirectional link. Both ends
// send independent random streams at the same time; each end must receive
// exactly the other end's words, in order, and nothing of its own.
module tb_fsl_bidir_link;
  import mpsoc_pkg::*;

  logic clk = 0, rst_n = 0;
  fsl_wr_t a_wr, b_wr;
  logic a_full, b_full, a_rd_en, b_rd_en;
  fsl_rd_t a_rd, b_rd;
  int checks = 0, failures = 0;

  fsl_bidir_link #(.DEPTH(4)) dut (.*);

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

  logic [FSL_W:0] qab[$], qba[$];
  int got_a = 0, got_b = 0;

  initial begin
    a_wr = '0; b_wr = '0; a_rd_en = 0; b_rd_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      a_wr = '0; b_wr = '0; a_rd_en = 0; b_rd_en = 0;
      if (!a_full && $urandom % 2) begin
        a_wr = '{write: 1, ctrl: 1'($urandom), data: {8'hA0, 24'($urandom)}};
        qab.push_back({a_wr.ctrl, a_wr.data});
      end
      if (!b_full && $urandom % 2) begin
        b_wr = '{write: 1, ctrl: 1'($urandom), data: {8'hB0, 24'($urandom)}};
        qba.push_back({b_wr.ctrl, b_wr.data});
      end
      if (b_rd.exists && $urandom % 2) begin
        b_rd_en = 1;
        check({b_rd.ctrl, b_rd.data} == qab[0], "B receives A's words in order");
        void'(qab.pop_front());
        got_b++;
      end
      if (a_rd.exists && $urandom % 2) begin
        a_rd_en = 1;
        check({a_rd.ctrl, a_rd.data} == qba[0], "A receives B's words in order");
        void'(qba.pop_front());
        got_a++;
      end
    end
    check(got_a > 500 && got_b > 500, "both directions carried traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
