// tb_workload_4x4_256x192: the speed-up measurement configuration, four
// nodes in each stage working on 256 x 192 frames.
module tb_workload_4x4_256x192;
  tb_array_harness #(.D1(2), .D2(2), .W(256), .H(192)) h ();

  // outer watchdog, in case the harness never reaches its own report
  initial begin
    repeat (3_000_000) @(posedge h.clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
