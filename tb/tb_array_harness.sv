// tb_array_harness: a configurable end-to-end test of the multistage array,
// used by the workload testbenches to run the stage sizes and frame sizes
// evaluated for the design. Two frames are sent from the host. Frame 0 is
// captured whole by every grabber and its first two rows are checked. From
// frame 1 on, stage-1 node j holds band j of the right half of the frame and
// stage-2 node j band j of the left half; every pixel of every band is
// checked. Each stage then runs the SCM exchange over its own hypercube
// (node 0 broadcasts a model word in D steps and gathers the maximum band
// score in D steps), and stage-1 node j passes its score to stage-2 node j
// for every j present in both stages.
module tb_array_harness
  import mpsoc_pkg::*;
#(
  parameter int D1 = 3,
  parameter int D2 = 3,
  parameter int W  = 256,
  parameter int H  = 256
) ();

  localparam int N1 = 1 << D1, N2 = 1 << D2, NL = (N1 < N2) ? N1 : N2;
  localparam int DL1 = (D1 > 0) ? D1 : 1, DL2 = (D2 > 0) ? D2 : 1;
  localparam int MAW = 14, GAW = 16;

  logic clk = 0, rst_n = 0;
  fsl_wr_t gen_wr;
  logic gen_full, gen_v_swap, gen_stall, is_busy;
  fsl_wr_t [N1-1:0][DL1-1:0] s1_hc_wr;
  logic    [N1-1:0][DL1-1:0] s1_hc_full, s1_hc_rd_en;
  fsl_rd_t [N1-1:0][DL1-1:0] s1_hc_rd;
  fsl_wr_t [N2-1:0][DL2-1:0] s2_hc_wr;
  logic    [N2-1:0][DL2-1:0] s2_hc_full, s2_hc_rd_en;
  fsl_rd_t [N2-1:0][DL2-1:0] s2_hc_rd;
  logic [N1-1:0] s1_ma_en, s1_mb_en, s1_cfg_valid, s1_evt_frame, s1_evt_clipped, s1_vm_en;
  logic [N2-1:0] s2_ma_en, s2_mb_en, s2_cfg_valid, s2_evt_frame, s2_evt_clipped, s2_vm_en;
  logic [N1-1:0][3:0] s1_ma_we, s1_mb_we;
  logic [N2-1:0][3:0] s2_ma_we, s2_mb_we;
  logic [N1-1:0][MAW-1:0] s1_ma_addr, s1_mb_addr;
  logic [N2-1:0][MAW-1:0] s2_ma_addr, s2_mb_addr;
  logic [N1-1:0][31:0] s1_ma_wdata, s1_mb_wdata, s1_ma_rdata, s1_mb_rdata;
  logic [N2-1:0][31:0] s2_ma_wdata, s2_mb_wdata, s2_ma_rdata, s2_mb_rdata;
  window_t [N1-1:0] s1_cfg_win;
  window_t [N2-1:0] s2_cfg_win;
  logic [N1-1:0][GAW:0] s1_evt_pixels;
  logic [N2-1:0][GAW:0] s2_evt_pixels;
  logic [N1-1:0][GAW-1:0] s1_vm_addr;
  logic [N2-1:0][GAW-1:0] s2_vm_addr;
  pixel_t [N1-1:0] s1_vm_data;
  pixel_t [N2-1:0] s2_vm_data;
  fsl_wr_t [NL-1:0] s1_is_wr;
  logic [NL-1:0] s1_is_full, s2_is_rd_en;
  fsl_rd_t [NL-1:0] s2_is_rd;
  int checks = 0, failures = 0;

  multistage_top #(.D1(D1), .D2(D2), .FRAME_W(W), .FRAME_H(H)) dut (.*);

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
    return pixel_t'((f * 29) + (x * 5) + (y * 3) + (x >> 4) * (y >> 4));
  endfunction

  int n_hc = 0, n_is = 0, n_swaps = 0;
  always @(posedge clk) if (rst_n) begin
    if (gen_v_swap) n_swaps++;
    for (int n = 0; n < N1; n++) for (int d = 0; d < D1; d++) if (s1_hc_wr[n][d].write) n_hc++;
    for (int n = 0; n < N2; n++) for (int d = 0; d < D2; d++) if (s2_hc_wr[n][d].write) n_hc++;
    for (int n = 0; n < NL; n++) if (s1_is_wr[n].write) n_is++;
  end

  // host: two frames
  initial begin
    gen_wr = '0;
    wait (rst_n);
    for (int f = 0; f < 2; f++)
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

  window_t win1 [N1], win2 [N2];
  logic [31:0] sc1 [N1], sc2 [N2], best1, best2, w;

  task automatic wait_frame();
    @(negedge clk);
    while (!s1_evt_frame[0]) @(negedge clk);
    check(s1_evt_frame == '1 && s2_evt_frame == '1, "every grabber signals the frame");
  endtask

  initial begin
    s1_hc_wr = '0; s2_hc_wr = '0; s1_hc_rd_en = '0; s2_hc_rd_en = '0;
    {s1_ma_en, s1_mb_en, s1_ma_we, s1_mb_we, s1_ma_addr, s1_mb_addr, s1_ma_wdata, s1_mb_wdata} = '0;
    {s2_ma_en, s2_mb_en, s2_ma_we, s2_mb_we, s2_ma_addr, s2_mb_addr, s2_ma_wdata, s2_mb_wdata} = '0;
    s1_cfg_valid = '0; s2_cfg_valid = '0; s1_cfg_win = '0; s2_cfg_win = '0;
    s1_vm_en = '0; s2_vm_en = '0; s1_vm_addr = '0; s2_vm_addr = '0;
    s1_is_wr = '0; s2_is_rd_en = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < N1; n++) begin
      win1[n] = '{x0: coord_t'(W / 2), y0: coord_t'(n * (H / N1)), width: coord_t'(W / 2), height: coord_t'(H / N1)};
      s1_cfg_win[n] = win1[n];
    end
    for (int n = 0; n < N2; n++) begin
      win2[n] = '{x0: 0, y0: coord_t'(n * (H / N2)), width: coord_t'(W / 2), height: coord_t'(H / N2)};
      s2_cfg_win[n] = win2[n];
    end
    s1_cfg_valid = '1; s2_cfg_valid = '1;
    @(negedge clk);
    s1_cfg_valid = '0; s2_cfg_valid = '0;

    // frame 0: whole frame
    wait_frame();
    for (int n = 0; n < N1; n++) check(s1_evt_pixels[n] == (GAW+1)'(W * H), "stage 1 full frame");
    for (int n = 0; n < N2; n++) check(s2_evt_pixels[n] == (GAW+1)'(W * H), "stage 2 full frame");
    for (int a = 0; a < 2 * W; a++) begin
      s1_vm_en = '1; s2_vm_en = '1;
      for (int n = 0; n < N1; n++) s1_vm_addr[n] = GAW'(a);
      for (int n = 0; n < N2; n++) s2_vm_addr[n] = GAW'(a);
      @(negedge clk);
      for (int n = 0; n < N1; n++) check(s1_vm_data[n] == pix(0, a % W, a / W), "frame 0 stage 1");
      for (int n = 0; n < N2; n++) check(s2_vm_data[n] == pix(0, a % W, a / W), "frame 0 stage 2");
    end
    s1_vm_en = '0; s2_vm_en = '0;

    // frame 1: bands
    wait_frame();
    for (int n = 0; n < N1; n++) begin
      check(s1_evt_pixels[n] == (GAW+1)'((W / 2) * (H / N1)), "stage 1 band size");
      sc1[n] = 0;
    end
    for (int n = 0; n < N2; n++) begin
      check(s2_evt_pixels[n] == (GAW+1)'((W / 2) * (H / N2)), "stage 2 band size");
      sc2[n] = 0;
    end
    for (int a = 0; a < (W / 2) * (H / NL); a++) begin
      s1_vm_en = '1; s2_vm_en = '1;
      for (int n = 0; n < N1; n++) s1_vm_addr[n] = GAW'(a);
      for (int n = 0; n < N2; n++) s2_vm_addr[n] = GAW'(a);
      @(negedge clk);
      for (int n = 0; n < N1; n++)
        if (a < (W / 2) * (H / N1)) begin
          check(s1_vm_data[n] == pix(1, W / 2 + a % (W / 2), n * (H / N1) + a / (W / 2)), "stage 1 band pixel");
          sc1[n] += 32'(s1_vm_data[n]);
        end
      for (int n = 0; n < N2; n++)
        if (a < (W / 2) * (H / N2)) begin
          check(s2_vm_data[n] == pix(1, a % (W / 2), n * (H / N2) + a / (W / 2)), "stage 2 band pixel");
          sc2[n] += 32'(s2_vm_data[n]);
        end
    end
    s1_vm_en = '0; s2_vm_en = '0;
    best1 = 0; best2 = 0;
    for (int n = 0; n < N1; n++) if (sc1[n] > best1) best1 = sc1[n];
    for (int n = 0; n < N2; n++) if (sc2[n] > best2) best2 = sc2[n];

    // broadcast from node 0 (stage 1), D1 steps
    for (int d = 0; d < D1; d++) begin
      for (int n = 0; n < (1 << d); n++) s1_hc_wr[n][d] = '{write: 1, ctrl: 1, data: 32'hB0 + 32'(d)};
      @(negedge clk);
      s1_hc_wr = '0;
      for (int n = 0; n < (1 << d); n++) begin
        check(s1_hc_rd[n | (1 << d)][d].exists && s1_hc_rd[n | (1 << d)][d].data == 32'hB0 + 32'(d), "stage 1 broadcast");
        s1_hc_rd_en[n | (1 << d)][d] = s1_hc_rd[n | (1 << d)][d].exists;
      end
      @(negedge clk);
      s1_hc_rd_en = '0;
    end
    // gather the maximum to node 0, D1 steps
    for (int d = D1 - 1; d >= 0; d--) begin
      for (int n = (1 << d); n < (2 << d); n++) s1_hc_wr[n][d] = '{write: 1, ctrl: 0, data: sc1[n]};
      @(negedge clk);
      s1_hc_wr = '0;
      for (int n = 0; n < (1 << d); n++) begin
        w = s1_hc_rd[n][d].data;
        check(s1_hc_rd[n][d].exists, "stage 1 gather");
        s1_hc_rd_en[n][d] = s1_hc_rd[n][d].exists;
        if (w > sc1[n]) sc1[n] = w;
      end
      @(negedge clk);
      s1_hc_rd_en = '0;
    end
    check(sc1[0] == best1, "stage 1 node 0 holds the best score");
    // same for stage 2
    for (int d = 0; d < D2; d++) begin
      for (int n = 0; n < (1 << d); n++) s2_hc_wr[n][d] = '{write: 1, ctrl: 1, data: 32'hC0 + 32'(d)};
      @(negedge clk);
      s2_hc_wr = '0;
      for (int n = 0; n < (1 << d); n++) begin
        check(s2_hc_rd[n | (1 << d)][d].exists && s2_hc_rd[n | (1 << d)][d].data == 32'hC0 + 32'(d), "stage 2 broadcast");
        s2_hc_rd_en[n | (1 << d)][d] = s2_hc_rd[n | (1 << d)][d].exists;
      end
      @(negedge clk);
      s2_hc_rd_en = '0;
    end
    for (int d = D2 - 1; d >= 0; d--) begin
      for (int n = (1 << d); n < (2 << d); n++) s2_hc_wr[n][d] = '{write: 1, ctrl: 0, data: sc2[n]};
      @(negedge clk);
      s2_hc_wr = '0;
      for (int n = 0; n < (1 << d); n++) begin
        w = s2_hc_rd[n][d].data;
        check(s2_hc_rd[n][d].exists, "stage 2 gather");
        s2_hc_rd_en[n][d] = s2_hc_rd[n][d].exists;
        if (w > sc2[n]) sc2[n] = w;
      end
      @(negedge clk);
      s2_hc_rd_en = '0;
    end
    check(sc2[0] == best2, "stage 2 node 0 holds the best score");

    // inter-stage: stage-1 node j to stage-2 node j
    for (int n = 0; n < NL; n++) s1_is_wr[n] = '{write: 1, ctrl: 0, data: 32'h1000 + 32'(n)};
    @(negedge clk);
    s1_is_wr = '0;
    for (int n = 0; n < NL; n++) begin
      check(s2_is_rd[n].exists && s2_is_rd[n].data == 32'h1000 + 32'(n), "inter-stage pairing");
      s2_is_rd_en[n] = s2_is_rd[n].exists;
    end
    @(negedge clk);
    s2_is_rd_en = '0;
    @(negedge clk);
    check(!is_busy, "inter-stage links drained");

    check(n_swaps == 2, "one V_Swap per frame");
    check(n_hc == 2 * (N1 - 1) + 2 * (N2 - 1), "hypercube words of split and merge");
    check(n_is == NL, "one inter-stage word per pair");
    report();
  end
endmodule
