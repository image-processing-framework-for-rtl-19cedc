// tb_git_remap: self-checking testbench of the geometric transformation.
// 32x20 frames, a ring of 8 lines (D = 4) and 8x8 map blocks. A random
// displacement map (dx in -10..10, dy in -5..5, so some dy are clamped to
// +/-3) is written, three random frames are streamed with random gaps, and
// the map is rewritten between frames. Every output word is compared with a
// reference computed here: output word n is output pixel n - D*W of the
// frame sequence, sampled at (x+dx, y+dy) with the map in force when the
// word leaves, FILL outside the frame and before D lines have arrived. Each
// output must follow its input by one cycle.
module tb_git_remap;
  localparam int W = 32, H = 20, D = 4, GS = 3;
  localparam int MW = (W + 7) / 8, MH = (H + 7) / 8, MN = MW * MH;
  localparam int FRAMES = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [7:0] in_data = 0, out_data;
  logic map_we = 0;
  logic [$clog2(MN)-1:0] map_addr = 0;
  logic [15:0] map_data = 0;
  int checks = 0, failures = 0;

  git_remap #(.W(W), .H(H), .DW(8), .D(D), .GS(GS), .FILL(8'hF0)) dut (.*);
  always #5 clk = ~clk;

  int img [FRAMES][H][W];
  int mdx [MN], mdy [MN];
  int expq [$];

  task automatic write_map();
    for (int i = 0; i < MN; i++) begin
      mdx[i] = $urandom_range(0, 20) - 10;
      mdy[i] = $urandom_range(0, 10) - 5;
      @(negedge clk);
      map_we = 1; map_addr = i[$clog2(MN)-1:0];
      map_data = {8'(mdx[i]), 8'(mdy[i])};
    end
    @(negedge clk); map_we = 0;
  endtask

  function automatic int ref_px(int n);
    int p, f, xo, yo, e, dy, sx, sy;
    if (n < D * W) return 'hF0;
    p  = n - D * W;
    f  = p / (W * H);
    xo = p % W;
    yo = (p / W) % H;
    e  = (yo >> GS) * MW + (xo >> GS);
    dy = mdy[e] > D - 1 ? D - 1 : (mdy[e] < -(D - 1) ? -(D - 1) : mdy[e]);
    sx = xo + mdx[e];
    sy = yo + dy;
    if (sx < 0 || sx >= W || sy < 0 || sy >= H) return 'hF0;
    return img[f][sy][sx];
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front();
      if (out_data != 8'(e)) begin
        failures++;
        if (failures < 10) $display("got %0h exp %0h", out_data, e);
      end
    end
  end

  // one-cycle latency
  logic in_valid_q = 0;
  always @(posedge clk) begin
    in_valid_q <= in_valid;
    if (rst_n && (out_valid != in_valid_q)) begin
      failures++; $display("latency violated");
    end
  end

  initial begin
    int n;
    n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      write_map();
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[f][y][x] = $urandom_range(0, 255);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_data = 8'(img[f][y][x]);
          expq.push_back(ref_px(n));
          n++;
          @(negedge clk);
          in_valid = 0;
          repeat ($urandom_range(0, 1)) @(negedge clk);
        end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
