// tb_hypercube_stage: self-checking test of one 8-node (D = 3) stage with
// small memories and grabber buffers. It checks that every link joins node n
// to node n ^ 2^d on dimension d and nowhere else, runs the node-0 broadcast
// of the SCM scheme (recursive doubling over the cube, D steps) and the
// gather of one result per node back to node 0, checks that the local
// memories are private to their nodes, and that every grabber captures its
// own window of one frame sent on the video bus.
module tb_hypercube_stage;
  import mpsoc_pkg::*;

  localparam int D = 3, N = 1 << D, MEM = 1024, BUF = 64, W = 8, H = 6;
  localparam int MAW = $clog2(MEM / 4), GAW = $clog2(BUF);

  logic clk = 0, rst_n = 0;
  fsl_wr_t [N-1:0][D-1:0] hc_wr;
  logic    [N-1:0][D-1:0] hc_full, hc_rd_en;
  fsl_rd_t [N-1:0][D-1:0] hc_rd;
  logic [N-1:0] ma_en, mb_en;
  logic [N-1:0][3:0] ma_we, mb_we;
  logic [N-1:0][MAW-1:0] ma_addr, mb_addr;
  logic [N-1:0][31:0] ma_wdata, ma_rdata, mb_wdata, mb_rdata;
  video_beat_t vb;
  logic vb_vsync;
  logic [N-1:0] cfg_valid, evt_frame, evt_clipped, vm_en;
  window_t [N-1:0] cfg_win;
  logic [N-1:0][GAW:0] evt_pixels;
  logic [N-1:0][GAW-1:0] vm_addr;
  pixel_t [N-1:0] vm_data;
  int checks = 0, failures = 0;

  hypercube_stage #(.D(D), .FIFO_DEPTH(4), .MEM_BYTES(MEM), .BUF_PIXELS(BUF), .DEF_W(W), .DEF_H(H)) dut (.*);

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

  task automatic idle();
    hc_wr = '0; hc_rd_en = '0;
    ma_en = '0; mb_en = '0; ma_we = '0; mb_we = '0;
    cfg_valid = '0; vm_en = '0; vb = '0; vb_vsync = 0;
  endtask

  // pop and return the head word of node n, dimension d
  task automatic pop(input int n, input int d, output logic [31:0] w);
    check(hc_rd[n][d].exists, "word waiting on link");
    w = hc_rd[n][d].data;
    hc_rd_en[n][d] = hc_rd[n][d].exists;
    @(negedge clk);
    hc_rd_en[n][d] = 0;
  endtask

  logic [N-1:0] has_model;
  logic [31:0] model [N];

  initial begin
    logic [31:0] w;
    idle(); ma_addr = '0; mb_addr = '0; ma_wdata = '0; mb_wdata = '0; cfg_win = '0; vm_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. topology: each node sends a tagged word on each dimension
    for (int n = 0; n < N; n++)
      for (int d = 0; d < D; d++) hc_wr[n][d] = '{write: 1, ctrl: 0, data: 32'(n * 16 + d)};
    @(negedge clk);
    hc_wr = '0;
    for (int n = 0; n < N; n++)
      for (int d = 0; d < D; d++) begin
        check(hc_rd[n][d].exists, "word arrived");
        check(hc_rd[n][d].data == 32'((n ^ (1 << d)) * 16 + d), $sformatf("node %0d dim %0d joined to node %0d", n, d, n ^ (1 << d)));
        hc_rd_en[n][d] = hc_rd[n][d].exists;
      end
    @(negedge clk);
    hc_rd_en = '0;
    for (int n = 0; n < N; n++)
      for (int d = 0; d < D; d++) check(!hc_rd[n][d].exists, "exactly one word per link end");

    // 2. SCM split: node 0 broadcasts the road model by recursive doubling
    has_model = 1; model[0] = 32'h5EED_0000;
    for (int d = 0; d < D; d++) begin
      for (int n = 0; n < N; n++)
        if (has_model[n] && ((n >> d) & 1) == 0) hc_wr[n][d] = '{write: 1, ctrl: 1, data: model[n]};
      @(negedge clk);
      hc_wr = '0;
      for (int n = 0; n < N; n++)
        if (!has_model[n] && hc_rd[n][d].exists) begin
          check(hc_rd[n][d].ctrl, "model word carries the control bit");
          pop(n, d, model[n]);
          has_model[n] = 1;
        end
    end
    check(has_model == '1, "model reached every node in D steps");
    for (int n = 0; n < N; n++) check(model[n] == 32'h5EED_0000, "model intact");

    // 3. SCM merge: scores travel back to node 0 along falling dimensions
    for (int d = D - 1; d >= 0; d--) begin
      for (int n = 0; n < N; n++)
        if (n < (2 << d) && ((n >> d) & 1)) hc_wr[n][d] = '{write: 1, ctrl: 0, data: model[n] + 32'(n)};
      @(negedge clk);
      hc_wr = '0;
      for (int n = 0; n < (1 << d); n++) begin
        pop(n, d, w);
        check(w == model[n ^ (1 << d)] + 32'(n ^ (1 << d)), "partial result received");
        // keep the best score (largest) at the receiving node
        if (w > model[n] + 32'(n)) model[n] = w - 32'(n);
      end
    end
    check(model[0] + 32'(0) == 32'h5EED_0000 + 32'(N - 1), "node 0 selects the maximum score");

    // 4. private memories
    for (int n = 0; n < N; n++) begin
      mb_en[n] = 1; mb_we[n] = 4'hF; mb_addr[n] = MAW'(5); mb_wdata[n] = 32'hA000 + 32'(n);
    end
    @(negedge clk);
    mb_en = '0; mb_we = '0;
    for (int n = 0; n < N; n++) begin ma_en[n] = 1; ma_addr[n] = MAW'(5); end
    @(negedge clk);
    ma_en = '0;
    for (int n = 0; n < N; n++) check(ma_rdata[n] == 32'hA000 + 32'(n), "memory private to its node");

    // 5. grabbers: node n keeps the 2 x 2 block at (n % 4 * 2, n / 4 * 2)
    for (int n = 0; n < N; n++) begin
      cfg_valid[n] = 1;
      cfg_win[n] = '{x0: coord_t'((n % 4) * 2), y0: coord_t'((n / 4) * 2), width: 2, height: 2};
    end
    @(negedge clk);
    cfg_valid = '0;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          vb = '{valid: 1, x: coord_t'(x), y: coord_t'(y), pixel: pixel_t'(f * 100 + y * W + x)};
          vb_vsync = (x == W - 1 && y == H - 1);
          @(negedge clk);
          vb = '0; vb_vsync = 0;
        end
    check(evt_frame == '1, "every grabber signals the frame");
    for (int n = 0; n < N; n++) check(evt_pixels[n] == 4, "each block holds 4 pixels");
    for (int i = 0; i < 4; i++) begin
      vm_en = '1;
      for (int n = 0; n < N; n++) vm_addr[n] = GAW'(i);
      @(negedge clk);
      for (int n = 0; n < N; n++)
        check(vm_data[n] == pixel_t'(100 + ((n / 4) * 2 + i / 2) * W + (n % 4) * 2 + i % 2),
              $sformatf("node %0d block pixel %0d", n, i));
    end
    vm_en = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
