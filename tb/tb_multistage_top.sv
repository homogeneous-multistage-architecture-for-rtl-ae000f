// tb_multistage_top: end-to-end test of the two-stage array at its default
// size (two 8-node hypercube stages, 256 x 256 frames, 64 KB memories).
//
// A host process sends three frames as FSL words. The test then plays the
// processors of both stages, as in the SCM (split-compute-merge) scheme:
//   frame 0: every grabber holds the whole frame; a sample of it is checked;
//   frame 1: each stage-1 node holds a 128 x 32 block of the right half of
//            the frame and each stage-2 node one of the left half; every
//            pixel of every block is checked. Node 0 of each stage broadcasts
//            a model word over the hypercube, each node computes a score from
//            its block and keeps it in its local memory, the scores are merged
//            back to node 0 (maximum), and each stage-1 node passes its score
//            to the same node of stage 2 over the inter-stage link;
//   frame 2: the windows stay in force; events and a sample are checked.
// It counts how often each mechanism occurred (host words, host-link
// back-pressure, generator V_Swap and input stall, grabber events, windowed
// captures, hypercube and inter-stage words, inter-stage back-pressure,
// memory accesses) and fails if any never did. It also checks that a frame
// takes W*H+4 cycles from V_Swap to the grabbers' event, well inside the
// 18 frames/s budget at a 200 MHz clock.
module tb_multistage_top;
  import mpsoc_pkg::*;

  localparam int W = 256, H = 256, D = 3, N = 8, MAW = 14, GAW = 16;
  localparam int NFRAMES = 3;

  logic clk = 0, rst_n = 0;
  fsl_wr_t gen_wr;
  logic gen_full, gen_v_swap, gen_stall, is_busy;
  fsl_wr_t [N-1:0][D-1:0] s1_hc_wr, s2_hc_wr;
  logic    [N-1:0][D-1:0] s1_hc_full, s2_hc_full, s1_hc_rd_en, s2_hc_rd_en;
  fsl_rd_t [N-1:0][D-1:0] s1_hc_rd, s2_hc_rd;
  logic [N-1:0] s1_ma_en, s1_mb_en, s2_ma_en, s2_mb_en;
  logic [N-1:0][3:0] s1_ma_we, s1_mb_we, s2_ma_we, s2_mb_we;
  logic [N-1:0][MAW-1:0] s1_ma_addr, s1_mb_addr, s2_ma_addr, s2_mb_addr;
  logic [N-1:0][31:0] s1_ma_wdata, s1_mb_wdata, s2_ma_wdata, s2_mb_wdata;
  logic [N-1:0][31:0] s1_ma_rdata, s1_mb_rdata, s2_ma_rdata, s2_mb_rdata;
  logic [N-1:0] s1_cfg_valid, s2_cfg_valid, s1_evt_frame, s2_evt_frame;
  logic [N-1:0] s1_evt_clipped, s2_evt_clipped, s1_vm_en, s2_vm_en;
  window_t [N-1:0] s1_cfg_win, s2_cfg_win;
  logic [N-1:0][GAW:0] s1_evt_pixels, s2_evt_pixels;
  logic [N-1:0][GAW-1:0] s1_vm_addr, s2_vm_addr;
  pixel_t [N-1:0] s1_vm_data, s2_vm_data;
  fsl_wr_t [N-1:0] s1_is_wr;
  logic [N-1:0] s1_is_full, s2_is_rd_en;
  fsl_rd_t [N-1:0] s2_is_rd;
  int checks = 0, failures = 0;

  multistage_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
  end

  function automatic pixel_t pix(input int f, input int x, input int y);
    return pixel_t'((f * 53) ^ (x * 3) ^ (y * 7) ^ (x >> 3));
  endfunction

  // ---------------------------------------------------------------- counters
  int n_host_words = 0, n_host_full = 0, n_swaps = 0, n_gen_stall = 0;
  int n_ev1 = 0, n_ev2 = 0, n_windowed = 0, n_hc_words = 0, n_is_words = 0;
  int n_is_full = 0, n_mem = 0;
  longint cyc = 0, swap_at = -1, latency = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // frame transport time: from V_Swap to the grabbers' event for that frame
    if (gen_v_swap && swap_at < 0) swap_at = cyc;
    if (s1_evt_frame[0] && latency < 0) latency = cyc - swap_at;
    if (gen_wr.write) n_host_words++;
    if (gen_full) n_host_full++;
    if (gen_v_swap) n_swaps++;
    if (gen_stall) n_gen_stall++;
    n_ev1 += $countones(s1_evt_frame);
    n_ev2 += $countones(s2_evt_frame);
    for (int n = 0; n < N; n++) begin
      if (s1_evt_frame[n] && s1_evt_pixels[n] < (GAW+1)'(W * H)) n_windowed++;
      if (s2_evt_frame[n] && s2_evt_pixels[n] < (GAW+1)'(W * H)) n_windowed++;
      for (int d = 0; d < D; d++) begin
        if (s1_hc_wr[n][d].write) n_hc_words++;
        if (s2_hc_wr[n][d].write) n_hc_words++;
      end
      if (s1_is_wr[n].write) n_is_words++;
      if (s1_is_full[n]) n_is_full++;
      n_mem += int'(s1_ma_en[n]) + int'(s1_mb_en[n]) + int'(s2_ma_en[n]) + int'(s2_mb_en[n]);
    end
  end

  // ------------------------------------------------------------ host sender
  initial begin
    gen_wr = '0;
    wait (rst_n);
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < W * H; i += 4) begin
        @(negedge clk);
        while (gen_full) @(negedge clk);
        gen_wr = '{write: 1, ctrl: 1'(i == 0),
                   data: {pix(f, (i+3) % W, (i+3) / W), pix(f, (i+2) % W, (i+2) / W),
                          pix(f, (i+1) % W, (i+1) / W), pix(f, i % W, i / W)}};
        @(posedge clk); #1;
        gen_wr = '0;
      end
  end

  // -------------------------------------------------------- processor models
  window_t win1 [N], win2 [N];
  logic [31:0] score [2][N];
  logic [31:0] model [2][N];

  task automatic wait_frame();
    @(negedge clk);
    while (!(s1_evt_frame[0])) @(negedge clk);
    check(s1_evt_frame == '1 && s2_evt_frame == '1, "all 16 grabbers signal the frame together");
  endtask

  // read address a of every grabber; check against the windows (or whole frame)
  task automatic read_all(input int f, input int a, input bit windowed);
    s1_vm_en = '1; s2_vm_en = '1;
    for (int n = 0; n < N; n++) begin s1_vm_addr[n] = GAW'(a); s2_vm_addr[n] = GAW'(a); end
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      int x1, y1, x2, y2;
      if (windowed) begin
        x1 = win1[n].x0 + a % win1[n].width; y1 = win1[n].y0 + a / win1[n].width;
        x2 = win2[n].x0 + a % win2[n].width; y2 = win2[n].y0 + a / win2[n].width;
      end else begin
        x1 = a % W; y1 = a / W; x2 = x1; y2 = y1;
      end
      check(s1_vm_data[n] == pix(f, x1, y1), $sformatf("f%0d stage 1 node %0d pixel %0d", f, n, a));
      check(s2_vm_data[n] == pix(f, x2, y2), $sformatf("f%0d stage 2 node %0d pixel %0d", f, n, a));
      if (windowed) begin
        score[0][n] += 32'(s1_vm_data[n]);
        score[1][n] += 32'(s2_vm_data[n]);
      end
    end
    s1_vm_en = '0; s2_vm_en = '0;
  endtask

  // write one hypercube word from node n of stage s on dimension d
  task automatic hc_put(input int s, input int n, input int d, input logic [31:0] w, input bit c);
    if (s == 0) begin
      check(!s1_hc_full[n][d], "room on link");
      if (!s1_hc_full[n][d]) s1_hc_wr[n][d] = '{write: 1, ctrl: c, data: w};
    end else begin
      check(!s2_hc_full[n][d], "room on link");
      if (!s2_hc_full[n][d]) s2_hc_wr[n][d] = '{write: 1, ctrl: c, data: w};
    end
  endtask

  task automatic hc_get(input int s, input int n, input int d, output logic [31:0] w);
    if (s == 0) begin
      check(s1_hc_rd[n][d].exists, "word waiting on link");
      w = s1_hc_rd[n][d].data; s1_hc_rd_en[n][d] = s1_hc_rd[n][d].exists;
    end else begin
      check(s2_hc_rd[n][d].exists, "word waiting on link");
      w = s2_hc_rd[n][d].data; s2_hc_rd_en[n][d] = s2_hc_rd[n][d].exists;
    end
  endtask

  task automatic hc_idle();
    s1_hc_wr = '0; s2_hc_wr = '0; s1_hc_rd_en = '0; s2_hc_rd_en = '0;
  endtask

  task automatic mem_write(input int s, input int n, input logic [31:0] w);
    if (s == 0) begin s1_mb_en[n] = 1; s1_mb_we[n] = 4'hF; s1_mb_addr[n] = MAW'(100 + n); s1_mb_wdata[n] = w; end
    else        begin s2_mb_en[n] = 1; s2_mb_we[n] = 4'hF; s2_mb_addr[n] = MAW'(100 + n); s2_mb_wdata[n] = w; end
  endtask

  initial begin
    logic [31:0] w, best [2];
    s1_cfg_valid = '0; s2_cfg_valid = '0; s1_cfg_win = '0; s2_cfg_win = '0;
    s1_vm_en = '0; s2_vm_en = '0; s1_vm_addr = '0; s2_vm_addr = '0;
    hc_idle();
    {s1_ma_en, s1_mb_en, s2_ma_en, s2_mb_en} = '0;
    {s1_ma_we, s1_mb_we, s2_ma_we, s2_mb_we} = '0;
    {s1_ma_addr, s1_mb_addr, s2_ma_addr, s2_mb_addr} = '0;
    {s1_ma_wdata, s1_mb_wdata, s2_ma_wdata, s2_mb_wdata} = '0;
    s1_is_wr = '0; s2_is_rd_en = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // windows for frame 1 on: stage 1 the right half, stage 2 the left half
    for (int n = 0; n < N; n++) begin
      win1[n] = '{x0: 128, y0: coord_t'(32 * n), width: 128, height: 32};
      win2[n] = '{x0: 0,   y0: coord_t'(32 * n), width: 128, height: 32};
    end
    s1_cfg_valid = '1; s2_cfg_valid = '1;
    for (int n = 0; n < N; n++) begin s1_cfg_win[n] = win1[n]; s2_cfg_win[n] = win2[n]; end
    @(negedge clk);
    s1_cfg_valid = '0; s2_cfg_valid = '0;

    // ---- frame 0: whole frame everywhere
    wait_frame();
    for (int n = 0; n < N; n++) begin
      check(s1_evt_pixels[n] == (GAW+1)'(W * H) && s2_evt_pixels[n] == (GAW+1)'(W * H), "full frame captured");
      check(!s1_evt_clipped[n] && !s2_evt_clipped[n], "no clipping");
    end
    for (int a = 0; a < 4 * W; a++) read_all(0, a, 0);
    for (int a = W * H - 2 * W; a < W * H; a++) read_all(0, a, 0);

    // ---- frame 1: blocks, SCM processing
    wait_frame();
    for (int n = 0; n < N; n++)
      check(s1_evt_pixels[n] == 4096 && s2_evt_pixels[n] == 4096, "block of 128 x 32 captured");
    for (int s = 0; s < 2; s++) for (int n = 0; n < N; n++) score[s][n] = 0;
    for (int a = 0; a < 128 * 32; a++) read_all(1, a, 1);

    // split: node 0 of each stage broadcasts its model word by recursive doubling
    for (int s = 0; s < 2; s++) begin
      model[s][0] = 32'hC0DE_0000 + 32'(s);
      for (int n = 1; n < N; n++) model[s][n] = '0;
    end
    for (int d = 0; d < D; d++) begin
      for (int s = 0; s < 2; s++)
        for (int n = 0; n < (1 << d); n++) hc_put(s, n, d, model[s][n], 1);
      @(negedge clk);
      hc_idle();
      for (int s = 0; s < 2; s++)
        for (int n = 0; n < (1 << d); n++) hc_get(s, n | (1 << d), d, model[s][n | (1 << d)]);
      @(negedge clk);
      hc_idle();
    end
    for (int s = 0; s < 2; s++)
      for (int n = 0; n < N; n++) check(model[s][n] == 32'hC0DE_0000 + 32'(s), "model reached every node");

    // compute: each node keeps its score in its local memory and reads it back
    for (int s = 0; s < 2; s++) for (int n = 0; n < N; n++) mem_write(s, n, score[s][n] ^ model[s][n]);
    @(negedge clk);
    {s1_mb_en, s2_mb_en, s1_mb_we, s2_mb_we} = '0;
    for (int n = 0; n < N; n++) begin
      s1_ma_en[n] = 1; s1_ma_addr[n] = MAW'(100 + n);
      s2_ma_en[n] = 1; s2_ma_addr[n] = MAW'(100 + n);
    end
    @(negedge clk);
    {s1_ma_en, s2_ma_en} = '0;
    for (int n = 0; n < N; n++) begin
      check(s1_ma_rdata[n] == (score[0][n] ^ model[0][n]), "stage 1 local memory");
      check(s2_ma_rdata[n] == (score[1][n] ^ model[1][n]), "stage 2 local memory");
    end

    // merge: scores travel to node 0, which keeps the maximum
    for (int s = 0; s < 2; s++) begin
      best[s] = 0;
      for (int n = 0; n < N; n++) if (score[s][n] > best[s]) best[s] = score[s][n];
    end
    for (int d = D - 1; d >= 0; d--) begin
      for (int s = 0; s < 2; s++)
        for (int n = (1 << d); n < (2 << d); n++) hc_put(s, n, d, score[s][n], 0);
      @(negedge clk);
      hc_idle();
      for (int s = 0; s < 2; s++)
        for (int n = 0; n < (1 << d); n++) begin
          hc_get(s, n, d, w);
          if (w > score[s][n]) score[s][n] = w;
        end
      @(negedge clk);
      hc_idle();
    end
    check(score[0][0] == best[0] && score[1][0] == best[1], "node 0 of each stage holds the best score");

    // pipe: stage-1 node j sends to stage-2 node j; fill link 0 to back-pressure
    for (int n = 0; n < N; n++) s1_is_wr[n] = '{write: 1, ctrl: 0, data: 32'(n) << 24 | 32'(n)};
    @(negedge clk);
    s1_is_wr = '0;
    for (int k = 1; k < 20 && !s1_is_full[0]; k++) begin
      s1_is_wr[0] = '{write: 1, ctrl: 1, data: 32'(k)};
      @(negedge clk);
      s1_is_wr = '0;
    end
    check(s1_is_full[0], "inter-stage link fills up");
    for (int n = 0; n < N; n++) begin
      check(s2_is_rd[n].exists && s2_is_rd[n].data == (32'(n) << 24 | 32'(n)), "stage 2 node j hears stage 1 node j");
      s2_is_rd_en[n] = s2_is_rd[n].exists;
    end
    @(negedge clk);
    s2_is_rd_en = '0;
    for (int k = 0; k < 40 && s2_is_rd[0].exists; k++) begin
      s2_is_rd_en[0] = 1; @(negedge clk); s2_is_rd_en = '0;
    end
    @(negedge clk);
    check(!is_busy, "inter-stage links drained");

    // ---- frame 2: windows still in force
    wait_frame();
    for (int a = 0; a < 256; a++) read_all(2, a, 1);

    // ---- mechanisms
    $display("host words %0d, host link full %0d cycles, V_Swaps %0d, generator stalls %0d cycles",
             n_host_words, n_host_full, n_swaps, n_gen_stall);
    $display("grabber events %0d + %0d, windowed captures %0d, hypercube words %0d",
             n_ev1, n_ev2, n_windowed, n_hc_words);
    $display("inter-stage words %0d, inter-stage full %0d cycles, memory accesses %0d",
             n_is_words, n_is_full, n_mem);
    $display("frame transport: %0d cycles from V_Swap to grabber event", latency);
    check(latency == W * H + 4, "frame crosses the video bus at one pixel per cycle");
    // 18 frames per second at the 200 MHz processor clock leave 11.1 M cycles per frame
    check(latency * 18 < 200_000_000, "transport fits the 18 frames/s budget");
    check(n_host_words == NFRAMES * W * H / 4, "every host word accepted");
    check(n_host_full > 0, "host link back-pressure happened");
    check(n_swaps == NFRAMES, "one V_Swap per frame");
    check(n_gen_stall > 0, "generator input stalled");
    check(n_ev1 == NFRAMES * N && n_ev2 == NFRAMES * N, "one event per frame per grabber");
    check(n_windowed == 2 * 2 * N, "windowed captures in frames 1 and 2");
    check(n_hc_words == 2 * 2 * (N - 1), "hypercube words of split and merge");
    check(n_is_words > N, "inter-stage words");
    check(n_is_full > 0, "inter-stage back-pressure happened");
    check(n_mem > 0, "local memory accesses");
    report();
  end
endmodule
