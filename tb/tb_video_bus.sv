// tb_video_bus: self-checking test of the video bus on a 5 x 3 frame. It
// sends frames with random idle cycles, back to back and with a restart by
// the start-of-frame flag, and checks on every tap the delayed pixel, its
// column and row, and that vsync comes exactly with the last pixel.
module tb_video_bus;
  import mpsoc_pkg::*;

  localparam int W = 5, H = 3, T = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sof;
  pixel_t in_pixel;
  video_beat_t tap[T];
  logic tap_vsync[T];
  int checks = 0, failures = 0;

  video_bus #(.FRAME_W(W), .FRAME_H(H), .NUM_TAPS(T)) dut (.*);

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

  int ex, ey, vs_seen = 0;

  task automatic send(input pixel_t p, input bit sof, input int x, input int y);
    in_valid = 1; in_sof = sof; in_pixel = p;
    @(negedge clk);
    in_valid = 0; in_sof = 0;
    for (int t = 0; t < T; t++) begin
      check(tap[t].valid && tap[t].pixel == p && tap[t].x == coord_t'(x) && tap[t].y == coord_t'(y),
            $sformatf("beat at (%0d,%0d) tap %0d", x, y, t));
      check(tap_vsync[t] == (x == W-1 && y == H-1), "vsync only with the last pixel");
    end
    if (tap_vsync[0]) vs_seen++;
  endtask

  initial begin
    in_valid = 0; in_sof = 0; in_pixel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < 4; f++) begin
      for (int i = 0; i < W * H; i++) begin
        send(pixel_t'($urandom), i == 0, i % W, i / W);
        if (f % 2 == 1) begin   // odd frames: random idle cycles
          repeat ($urandom % 3) begin
            @(negedge clk);
            check(!tap[0].valid && !tap_vsync[0], "idle bus between beats");
          end
        end
      end
    end
    // restart mid-frame with sof
    for (int i = 0; i < 7; i++) send(8'h11, i == 0, i % W, i / W);
    for (int i = 0; i < W * H; i++) send(8'h22, i == 0, i % W, i / W);
    check(vs_seen == 5, "one vsync per complete frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
