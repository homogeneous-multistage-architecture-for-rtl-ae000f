// tb_frame_generator: self-checking test of the frame generator on a 12 x 6
// frame. A model FSL source feeds four frames back to back, the first one
// preceded by an aborted partial frame that the control bit discards. The
// test checks every output pixel and its start-of-frame flag, that each
// frame leaves as one unbroken run of W*H cycles, that the first pixel
// follows v_swap by three cycles, and that the input side stalls while a
// full frame waits for the output side.
module tb_frame_generator;
  import mpsoc_pkg::*;

  localparam int W = 12, H = 6, P = W * H;

  logic clk = 0, rst_n = 0;
  logic in_rd_en;
  fsl_rd_t in_rd;
  logic out_valid, out_sof, v_swap, in_stall;
  pixel_t out_pixel;
  int checks = 0, failures = 0;

  frame_generator #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

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

  function automatic pixel_t pix(input int f, input int i);
    return pixel_t'(f * 37 + i * 5 + (i >> 4));
  endfunction

  // FSL source model: a queue of {ctrl, data} words
  logic [FSL_W:0] src[$];
  int head = 0;
  assign in_rd.exists = head < src.size();
  assign in_rd.ctrl   = (head < src.size()) ? src[head][FSL_W] : 1'b0;
  assign in_rd.data   = (head < src.size()) ? src[head][FSL_W-1:0] : '0;
  always @(posedge clk) if (in_rd_en) head <= head + 1;

  // output monitor
  int frame = 0, idx = 0, stalls = 0, swaps = 0, swap_cycle = -100, cyc = 0, last_valid_cycle = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_stall) stalls++;
    if (v_swap) begin swaps++; swap_cycle = cyc; end
    if (out_valid) begin
      if (idx == 0) begin
        check(out_sof, "sof on first pixel");
        check(cyc - swap_cycle == 3, "first pixel three cycles after v_swap");
      end else begin
        check(!out_sof, "no sof inside frame");
        check(cyc == last_valid_cycle + 1, "frame streams without gaps");
      end
      check(out_pixel == pix(frame, idx), $sformatf("pixel f%0d i%0d", frame, idx));
      last_valid_cycle = cyc;
      idx++;
      if (idx == P) begin idx = 0; frame++; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // aborted partial frame of garbage
    for (int w = 0; w < 10; w++) src.push_back({1'(w == 0), 32'hDEAD_0000 + w});
    for (int f = 0; f < 4; f++)
      for (int w = 0; w < P / 4; w++)
        src.push_back({1'(w == 0), pix(f, 4*w+3), pix(f, 4*w+2), pix(f, 4*w+1), pix(f, 4*w)});
    wait (frame == 4);
    repeat (5) @(posedge clk);
    check(swaps == 4, "four buffer swaps");
    check(stalls > 0, "input stalled while output busy");
    check(head == src.size(), "all input consumed");
    check(!out_valid, "stream stops after last frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
