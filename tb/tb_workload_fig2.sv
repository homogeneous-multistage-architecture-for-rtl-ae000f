// tb_workload_fig2: the 16 + 8 example configuration of the architecture,
// 16 nodes (a 4-cube) in stage 1 and 8 nodes (a 3-cube) in stage 2, with
// 256 x 256 frames; only nodes 0..7 of stage 1 have an inter-stage link.
module tb_workload_fig2;
  tb_array_harness #(.D1(4), .D2(3), .W(256), .H(256)) h ();

  // outer watchdog, in case the harness never reaches its own report
  initial begin
    repeat (3_000_000) @(posedge h.clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
