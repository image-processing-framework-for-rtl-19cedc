// tb_ipf_top: end-to-end testbench of the whole vision system, at a reduced
// size (32x24 images, disparities 0..15, 64-word synchronising buffers).
// Two cameras deliver three frames of a smooth textured scene that moves one
// pixel to the right per frame; the right camera sees it DTRUE pixels
// further left (true disparity DTRUE). The supervisor's part is played here:
// it writes identity transformation maps, enables all nine memory data sinks
// with their own frame buffers, and after the second frame starts the memory
// data source on the two level-0 frames it finds in RAM. Camera 1 starts
// three lines late in frame 3 and sends one short line there.
// Checked against values computed here: level 0 and the four Gaussian levels
// of frame 1 in RAM, word for word; the stereo disparities of frame 2
// (accepted ones at the true disparity where a match exists); the mean optical flow (-1, 0) pixel
// from frame 2 to frame 1. Counted, each of which must happen: line
// padding, forced desynchronised output, accepted and rejected matches,
// flow outputs, bus contention, locked packets, a frame interrupt of every
// sink, source completion; no sink may overflow.
module tb_ipf_top;
  import ipf_pkg::*;
  localparam int W = 32, H = 24, DMAX = 15, DTRUE = 4;
  localparam int N = W * H;
  localparam int PCLK = 3, LBLANK = 40, FBLANK = 200;
  localparam int NSINK = 9, MAW = 16;
  localparam int DISP_W = $clog2(DMAX + 1) + 5;
  localparam int SINK_DW [NSINK] = '{8, 8, 8, 8, 8, DISP_W, 33, 19, 121};
  localparam int MAP_N = ((W + 15) >> 4) * ((H + 15) >> 4);

  logic clk = 0, rst_n = 0;
  logic cam_fval [2], cam_lval [2], cam_pclk_en [2];
  pix_t cam_data [2];
  bus_req_t ram_req;
  bus_rsp_t ram_rsp;
  logic              sink_enable [NSINK];
  logic [BUS_AW-1:0] sink_base   [NSINK];
  logic [BUS_AW-1:0] sink_stride [NSINK];
  logic              sink_irq    [NSINK];
  logic [1:0]        sink_buf    [NSINK];
  logic              sink_ovf    [NSINK];
  logic              src_start = 0, src_busy, src_done;
  logic [BUS_AW-1:0] src_base [2];
  logic [15:0]       src_gap = 16'd9;
  logic              map_we [2];
  logic [$clog2(MAP_N)-1:0] map_addr = '0;
  logic [15:0]       map_data = '0;
  logic              cam_frame_done [2], cam_fmt_err [2];
  logic [31:0]       sync_desync;
  int checks = 0, failures = 0;

  ipf_top #(.W(W), .H(H), .SSD_DMAX(DMAX), .SDSO_DEPTH(64)) dut (.*);
  ram_model #(.MAW(MAW), .LAT(4), .STALL_PCT(10)) ram (.clk, .rst_n, .req(ram_req), .rsp(ram_rsp));

  always #5 clk = ~clk;

  // ---------------- scene ----------------
  function automatic int scene(int xx, int y);
    real v;
    int h;
    h = ((xx + 4096) * 7919 + y * 104729) % 11 - 5;
    v = 128.0 + 45.0 * $sin(xx / 2.3 + y / 5.1) + 35.0 * $cos(xx / 3.7 - y / 2.9) + h;
    return v < 0 ? 0 : (v > 255 ? 255 : int'(v));
  endfunction
  // frame n (1..3) of camera c
  function automatic int pix(int n, int c, int x, int y);
    return scene(x - n + (c == 1 ? DTRUE : 0), y);
  endfunction

  // ---------------- memory layout ----------------
  function automatic int beats(int s);
    int dw, per;
    dw = SINK_DW[s];
    if (dw <= 32) begin per = 32 / dw; return (N + per - 1) / per; end
    return N * ((dw + 31) / 32);
  endfunction

  // ---------------- reference pyramid of frame 1 ----------------
  int lvl [5][H][W];
  localparam int C5 [5] = '{1, 4, 6, 4, 1};
  task automatic build_pyramid();
    int v [H][W];
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) lvl[0][y][x] = pix(1, 0, x, y);
    for (int l = 1; l < 5; l++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int s = 0;
          s = 0;
          for (int j = 0; j < 5; j++) s += C5[j] * lvl[l-1][(y - j < 0) ? 0 : y - j][x];
          v[y][x] = ((s + 8) >> 4) > 255 ? 255 : ((s + 8) >> 4);
        end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int s = 0;
          s = 0;
          for (int i = 0; i < 5; i++) s += C5[i] * v[y][(x - i < 0) ? 0 : x - i];
          lvl[l][y][x] = ((s + 8) >> 4) > 255 ? 255 : ((s + 8) >> 4);
        end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_pad = 0, n_contend = 0, n_lock = 0, n_irq [NSINK], n_done = 0, n_map = 0;
  int n_disp_ok = 0, n_disp_rej = 0, n_flow_ok = 0;
  always @(posedge clk) if (rst_n) begin
    int v;
    if (dut.g_cam[1].u_ldso.pad != 0) n_pad++;
    v = 0;
    for (int m = 0; m < NSINK + 1; m++) if (dut.m_req[m].valid) v++;
    if (v > 1) n_contend++;
    if (ram_req.valid && ram_req.lock && ram_rsp.ready) n_lock++;
    for (int s = 0; s < NSINK; s++) if (sink_irq[s]) n_irq[s]++;
    if (src_done) n_done++;
    if (map_we[0] || map_we[1]) n_map++;
    if (dut.disp_valid) begin
      if (dut.disp_data[DISP_W-1]) n_disp_ok++; else n_disp_rej++;
    end
    if (dut.flow_valid && dut.flow_data[32]) n_flow_ok++;
  end

  // ---------------- frame checks ----------------
  bit pyr_checked [5];
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 5; l++)
      if (sink_irq[l] && sink_buf[l] == 0 && !pyr_checked[l]) begin
        int bad;
        bad = 0;
        pyr_checked[l] = 1;
        for (int i = 0; i < N; i++) begin
          logic [31:0] w;
          w = ram.mem[MAW'(sink_base[l] + i / 4)];
          if (w[8*(i%4) +: 8] != 8'(lvl[l][i / W][i % W])) bad++;
        end
        checks++;
        if (bad != 0) begin failures++; $display("pyramid level %0d: %0d pixels differ", l, bad); end
        else $display("pyramid level %0d of frame 1 matches", l);
      end
  end

  task automatic check_disparity();
    int per, ok, hit;
    per = 32 / DISP_W; ok = 0; hit = 0;
    for (int i = 0; i < N; i++) begin
      logic [31:0] w;
      logic [DISP_W-1:0] d;
      w = ram.mem[MAW'(sink_base[5] + sink_stride[5] + i / per)];
      d = w[DISP_W*(i%per) +: DISP_W];
      // blocks closer to the left edge than the true disparity have no
      // true match in the right image; they are left out
      // the matcher's left-right check holds results back DMAX words
      if (d[DISP_W-1] && i >= DMAX && (i - DMAX) % W >= 10 + DTRUE + 1) begin
        ok++;
        if (int'(d[DISP_W-2:0]) >= DTRUE * 16 - 4 && int'(d[DISP_W-2:0]) <= DTRUE * 16 + 4) hit++;
      end
    end
    $display("disparity frame 2: %0d accepted, %0d at the true disparity", ok, hit);
    checks++;
    if (ok < N / 10 || hit * 10 < ok * 9) begin
      failures++; $display("disparity check failed");
      for (int i = 0; i < N; i += 37) begin
        logic [31:0] w;
        w = ram.mem[MAW'(sink_base[5] + sink_stride[5] + i / per)];
        $write("%0h ", w[DISP_W*(i%per) +: DISP_W]);
      end
      $display("");
    end
  endtask

  task automatic check_flow();
    longint su, sv, n;
    su = 0; sv = 0; n = 0;
    for (int i = 0; i < N; i++) begin
      logic [31:0] w0, w1;
      w0 = ram.mem[MAW'(sink_base[6] + 2 * i)];
      w1 = ram.mem[MAW'(sink_base[6] + 2 * i + 1)];
      if (w1[0]) begin su += longint'($signed(w0[31:16])); sv += longint'($signed(w0[15:0])); n++; end
    end
    if (n == 0) n = 1;
    $display("optical flow: mean u %0d, v %0d (1/256 pixel)", su / n, sv / n);
    checks++;
    if (su / n < -320 || su / n > -192 || sv / n < -64 || sv / n > 64) begin
      failures++; $display("flow check failed");
    end
  endtask

  // ---------------- cameras ----------------
  task automatic cam_frame(int c, int n, int delay, int short_line);
    repeat (delay) @(negedge clk);
    cam_fval[c] = 1;
    repeat (5) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      int len;
      len = (y == short_line) ? W - 6 : W;
      for (int x = 0; x < len; x++) begin
        cam_lval[c] = 1;
        cam_data[c] = pix_t'(pix(n, c, x, y));
        cam_pclk_en[c] = 1;
        @(negedge clk);
        cam_pclk_en[c] = 0;
        repeat (PCLK - 1) @(negedge clk);
      end
      cam_lval[c] = 0;
      repeat (LBLANK) @(negedge clk);
    end
    cam_fval[c] = 0;
    repeat (FBLANK) @(negedge clk);
  endtask

  initial begin
    int addr;
    for (int c = 0; c < 2; c++) begin
      cam_fval[c] = 0; cam_lval[c] = 0; cam_pclk_en[c] = 0; cam_data[c] = '0; map_we[c] = 0;
    end
    for (int s = 0; s < NSINK; s++) n_irq[s] = 0;
    addr = 0;
    for (int s = 0; s < NSINK; s++) begin
      sink_enable[s] = 0;
      sink_base[s]   = BUS_AW'(addr);
      sink_stride[s] = BUS_AW'((beats(s) + 255) / 256 * 256);
      addr += 2 * int'(sink_stride[s]);
    end
    if (addr > (1 << MAW)) $display("memory model too small");
    build_pyramid();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // identity maps
    for (int i = 0; i < MAP_N; i++) begin
      @(negedge clk);
      map_we[0] = 1; map_we[1] = 1; map_addr = ($clog2(MAP_N))'(i); map_data = '0;
    end
    @(negedge clk); map_we[0] = 0; map_we[1] = 0;
    for (int s = 0; s < NSINK; s++) sink_enable[s] = 1;
    // frames 1 and 2
    for (int n = 1; n <= 2; n++)
      fork
        cam_frame(0, n, 0, -1);
        cam_frame(1, n, 7, -1);
      join
    // optical flow: I = frame 2 (buffer 1), J = frame 1 (buffer 0) of level 0
    src_base[0] = sink_base[0] + sink_stride[0];
    src_base[1] = sink_base[0];
    @(negedge clk); src_start = 1;
    @(negedge clk); src_start = 0;
    wait (src_done);
    repeat (2000) @(negedge clk);
    check_flow();
    // frame 3: camera 1 three lines late, one short line
    fork
      cam_frame(0, 3, 0, -1);
      cam_frame(1, 3, 3 * (W * PCLK + LBLANK), 5);
    join
    repeat (3000) @(negedge clk);
    check_disparity();
    begin
      int ovf;
      ovf = 0;
      for (int s = 0; s < NSINK; s++) if (sink_ovf[s]) ovf++;
      checks++;
      if (ovf != 0) begin failures++; $display("%0d sinks overflowed", ovf); end
    end
    for (int l = 0; l < 5; l++) begin
      checks++;
      if (!pyr_checked[l]) begin failures++; $display("level %0d never completed", l); end
    end
    for (int s = 0; s < NSINK; s++) begin
      checks++;
      if (n_irq[s] == 0) begin failures++; $display("sink %0d: no frame interrupt", s); end
    end
    $display("mechanisms: padding %0d, desync %0d, disparity accepted %0d rejected %0d, flow ok %0d,",
             n_pad, sync_desync, n_disp_ok, n_disp_rej, n_flow_ok);
    $display("            contention %0d, locked beats %0d, source done %0d, map writes %0d",
             n_contend, n_lock, n_done, n_map);
    checks += 9;
    if (n_pad == 0)       begin failures++; $display("no line padding"); end
    if (sync_desync == 0) begin failures++; $display("no forced desynchronised output"); end
    if (n_disp_ok == 0)   begin failures++; $display("no accepted match"); end
    if (n_disp_rej == 0)  begin failures++; $display("no rejected match"); end
    if (n_flow_ok == 0)   begin failures++; $display("no flow output"); end
    if (n_contend == 0)   begin failures++; $display("no bus contention"); end
    if (n_lock == 0)      begin failures++; $display("no locked packet"); end
    if (n_done != 1)      begin failures++; $display("source done %0d times", n_done); end
    if (n_map == 0)       begin failures++; $display("no map write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
