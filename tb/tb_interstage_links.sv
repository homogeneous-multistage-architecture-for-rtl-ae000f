// tb_interstage_links: self-checking test of the inter-stage link bank with
// four links. Every upstream node sends its own tagged words; each
// downstream node j must receive exactly the words of upstream node j, in
// order, and busy must follow the occupancy of the bank.
module tb_interstage_links;
  import mpsoc_pkg::*;

  localparam int N = 4, DEPTH = 4;

  logic clk = 0, rst_n = 0;
  fsl_wr_t [N-1:0] up_wr;
  logic [N-1:0] up_full, dn_rd_en;
  fsl_rd_t [N-1:0] dn_rd;
  logic busy;
  int checks = 0, failures = 0;

  interstage_links #(.N_LINKS(N), .DEPTH(DEPTH)) dut (.*);

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

  logic [FSL_W:0] q[N][$];
  int sent[N], got[N], full_seen = 0;

  initial begin
    up_wr = '0; dn_rd_en = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy, "idle after reset");
    for (int t = 0; t < 3000; t++) begin
      int occ;
      up_wr = '0; dn_rd_en = '0;
      for (int j = 0; j < N; j++) begin
        if (up_full[j]) full_seen++;
        if (!up_full[j] && $urandom % 2) begin
          up_wr[j] = '{write: 1, ctrl: 1'($urandom), data: {8'(j), 24'(sent[j])}};
          q[j].push_back({up_wr[j].ctrl, up_wr[j].data});
          sent[j]++;
        end
        if (dn_rd[j].exists && ($urandom % 3 == 0)) begin
          dn_rd_en[j] = 1;
          check({dn_rd[j].ctrl, dn_rd[j].data} == q[j][0], $sformatf("link %0d order and pairing", j));
          void'(q[j].pop_front());
          got[j]++;
        end
      end
      @(negedge clk);
      occ = 0;
      for (int j = 0; j < N; j++) occ += q[j].size();
      check(busy == (occ > 0), "busy follows occupancy");
    end
    up_wr = '0; dn_rd_en = '0;
    for (int j = 0; j < N; j++) check(got[j] > 100, $sformatf("link %0d carried traffic", j));
    check(full_seen > 0, "back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
