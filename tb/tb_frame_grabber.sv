// tb_frame_grabber: self-checking test of a frame grabber with a 60-pixel
// buffer on 8 x 6 frames. It checks the full-frame default window, a new
// window written mid-frame that must take effect only at the next frame, a
// window that overflows the buffer (clipping), the event port contents and
// timing, and that the output buffer keeps the previous frame readable while
// the next one is being captured.
module tb_frame_grabber;
  import mpsoc_pkg::*;

  localparam int BUF = 60, W = 8, H = 6, AW = $clog2(BUF);

  logic clk = 0, rst_n = 0;
  video_beat_t vb;
  logic vb_vsync, cfg_valid, evt_frame, evt_clipped, vm_en;
  window_t cfg_win;
  logic [AW:0] evt_pixels;
  logic [AW-1:0] vm_addr;
  pixel_t vm_data;
  int checks = 0, failures = 0;

  frame_grabber #(.BUF_PIXELS(BUF), .DEF_W(W), .DEF_H(H)) dut (.*);

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

  function automatic pixel_t pix(input int f, input int x, input int y);
    return pixel_t'(f * 64 + y * 11 + x * 3 + 1);
  endfunction

  pixel_t expect_q[$];
  int events = 0;
  always @(posedge clk) if (rst_n && evt_frame) events++;

  // read the whole output buffer through the video memory port and compare
  task automatic read_check(input string what);
    foreach (expect_q[i]) begin
      vm_en = 1; vm_addr = AW'(i);
      @(negedge clk);
      check(vm_data == expect_q[i], $sformatf("%s pixel %0d", what, i));
    end
    vm_en = 0;
  endtask

  // send one frame; build the expected window contents; optionally write a
  // new window in the middle of the frame
  task automatic send_frame(input int f, input int fw, input int fh, input window_t win,
                            input bit reconfig, input window_t nwin, input bit read_prev,
                            input pixel_t prev[$]);
    pixel_t e[$];
    int n;
    n = 0;
    for (int y = 0; y < fh; y++)
      for (int x = 0; x < fw; x++) begin
        vb = '{valid: 1, x: coord_t'(x), y: coord_t'(y), pixel: pix(f, x, y)};
        vb_vsync = (x == fw-1 && y == fh-1);
        if (x >= win.x0 && x < win.x0 + win.width && y >= win.y0 && y < win.y0 + win.height) begin
          if (e.size() < BUF) e.push_back(pix(f, x, y));
        end
        cfg_valid = reconfig && (y == 2 && x == 0);
        cfg_win   = nwin;
        if (read_prev && n < prev.size()) begin
          vm_en = 1; vm_addr = AW'(n);
        end else vm_en = 0;
        @(negedge clk);
        if (read_prev && n < prev.size()) begin
          check(vm_data == prev[n], "previous frame readable during capture");
          n++;
        end
        vb = '0; vb_vsync = 0; cfg_valid = 0; vm_en = 0;
        check(evt_frame == (x == fw-1 && y == fh-1), "event exactly after the last beat");
      end
    expect_q = e;
    check(evt_pixels == (AW+1)'(e.size()), $sformatf("event pixel count %0d", e.size()));
  endtask

  initial begin
    window_t win_f, win_s, win_b;
    pixel_t none[$];
    win_f  = '{x0: 0, y0: 0, width: W, height: H};
    win_s = '{x0: 2, y0: 1, width: 3, height: 4};
    win_b   = '{x0: 0, y0: 0, width: 10, height: 8};
    vb = '0; vb_vsync = 0; cfg_valid = 0; cfg_win = '0; vm_en = 0; vm_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // frame 0: default win_f window
    send_frame(0, W, H, win_f, 0, win_f, 0, none);
    check(!evt_clipped, "no clipping for the full frame");
    read_check("frame 0");
    // frame 1: window written mid-frame, frame still captured with the old one
    send_frame(1, W, H, win_f, 1, win_s, 1, expect_q);
    read_check("frame 1");
    // frame 2: new window in effect
    send_frame(2, W, H, win_s, 0, win_f, 1, expect_q);
    check(expect_q.size() == 12, "window holds 3 x 4 pixels");
    read_check("frame 2");
    // frame 3: a 10 x 8 frame with a 10 x 8 window overflows the 60-pixel buffer
    cfg_valid = 1; cfg_win = win_b; @(negedge clk); cfg_valid = 0;
    send_frame(3, W, H, win_s, 0, win_f, 0, none);
    send_frame(4, 10, 8, win_b, 0, win_f, 0, none);
    check(evt_clipped, "clipping reported");
    check(expect_q.size() == BUF, "buffer win_f after clipping");
    read_check("frame 4");
    check(events == 5, "one event per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
