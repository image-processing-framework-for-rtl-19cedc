// tb_lk_flow: self-checking testbench of the Lucas-Kanade estimator on 20x14
// frames with a 5x5 window. Two frame pairs are streamed: random images, and
// a smooth pattern I with J = I moved one pixel to the right, for which
// eta = G^-1 b, with dI = I - J, is the displacement from I to J: (+1, 0). Every word of
// the three output streams is compared with a reference computed here in
// 64-bit integer arithmetic from the equations (derivatives, window sums,
// determinant, numerators, truncating division, saturation); where ok is
// low only ok is compared. For the moved pattern the mean horizontal flow
// must come out near +1 pixel and the vertical near 0. The latencies of the
// derivative (1), covariance (3) and flow (19) streams are checked too.
module tb_lk_flow;
  localparam int W = 20, H = 14, WIN = 2, K = 5, FRAC = 8, QW = 15;
  localparam int GW = 24, DTW = 48, COVW = 1 + DTW + 3 * GW;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_i = 0, in_j = 0;
  logic flow_valid, der_valid, cov_valid;
  logic [32:0] flow_data;
  logic [18:0] der_data;
  logic [COVW-1:0] cov_data;
  int checks = 0, failures = 0;

  lk_flow #(.W(W), .H(H), .WIN(WIN), .FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int I [H][W], J [H][W];
  logic [18:0]     der_q  [$];
  logic [COVW-1:0] cov_q  [$];
  logic [32:0]     flow_q [$];
  int der_t [$], cov_t [$], flow_t [$];
  int msk_cov [$], msk_flow [$];
  longint sum_u = 0, sum_v = 0, n_uv = 0;
  bit measure = 0;

  function automatic bit dok(int x, int y); return x >= 2 && y >= 2; endfunction
  function automatic int fix(int x, int y); return I[y-1][x] - I[y-1][x-2]; endfunction
  function automatic int fiy(int x, int y); return I[y][x-1] - I[y-2][x-1]; endfunction
  function automatic int fdi(int x, int y); return I[y-1][x-1] - J[y-1][x-1]; endfunction

  function automatic longint sat_div(longint num, longint den);
    longint q, m;
    m = num < 0 ? -num : num;
    q = m / den;
    if (q > 32767) q = 32767;
    return num < 0 ? -q : q;
  endfunction

  task automatic expect_at(int x, int y, int t);
    bit ok;
    longint g [5];
    longint det, nu, nv, u, v;
    // derivatives
    if (dok(x, y)) der_q.push_back({1'b1, 9'(fix(x, y)), 9'(fiy(x, y))});
    else           der_q.push_back({1'b0, 18'b0});
    der_t.push_back(t + 1);
    // window
    ok = (x >= K + 1) && (y >= K + 1);
    for (int n = 0; n < 5; n++) g[n] = 0;
    if (ok)
      for (int j = 0; j < K; j++)
        for (int i = 0; i < K; i++) begin
          longint ix, iy, di;
          ix = longint'(fix(x - i, y - j)); iy = longint'(fiy(x - i, y - j)); di = longint'(fdi(x - i, y - j));
          g[0] += ix * ix; g[1] += ix * iy; g[2] += iy * iy; g[3] += di * ix; g[4] += di * iy;
        end
    det = g[0] * g[2] - g[1] * g[1];
    nu  = g[2] * g[3] - g[1] * g[4];
    nv  = g[0] * g[4] - g[1] * g[3];
    cov_q.push_back({ok, DTW'(det), GW'(g[2]), GW'(-g[1]), GW'(g[0])});
    msk_cov.push_back(int'(ok));
    cov_t.push_back(t + 3);
    if (ok && det != 0) begin
      u = sat_div(nu * (1 << (FRAC + 1)), det);
      v = sat_div(nv * (1 << (FRAC + 1)), det);
      flow_q.push_back({1'b1, 16'(u), 16'(v)});
      msk_flow.push_back(1);
    end else begin
      flow_q.push_back('0);
      msk_flow.push_back(0);
    end
    flow_t.push_back(t + 4 + QW);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (der_valid) begin
      logic [18:0] e; int t;
      e = der_q.pop_front(); t = der_t.pop_front();
      checks += 2;
      if (e[18] ? (der_data != e) : der_data[18]) begin failures++; $display("der got %h exp %h", der_data, e); end
      if (cyc != t) begin failures++; $display("der latency"); end
    end
    if (cov_valid) begin
      logic [COVW-1:0] e; int t, m;
      e = cov_q.pop_front(); t = cov_t.pop_front(); m = msk_cov.pop_front();
      checks += 2;
      if ((m != 0) ? (cov_data != e) : (cov_data[COVW-1] != 1'b0)) begin
        failures++; if (failures < 10) $display("cov got %h exp %h", cov_data, e);
      end
      if (cyc != t) begin failures++; $display("cov latency"); end
    end
    if (flow_valid) begin
      logic [32:0] e; int t, m;
      e = flow_q.pop_front(); t = flow_t.pop_front(); m = msk_flow.pop_front();
      checks += 2;
      if ((m != 0) ? (flow_data != e) : (flow_data[32] != 1'b0)) begin
        failures++; if (failures < 10) $display("flow got %h exp %h", flow_data, e);
      end
      if (cyc != t) begin failures++; $display("flow latency %0d %0d", cyc, t); end
      if (measure && flow_data[32]) begin
        sum_u += longint'($signed(flow_data[31:16])); sum_v += longint'($signed(flow_data[15:0])); n_uv++;
      end
    end
  end

  task automatic run_frame();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        in_valid = 1; in_i = 8'(I[y][x]); in_j = 8'(J[y][x]);
        expect_at(x, y, cyc);
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random pair
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        I[y][x] = $urandom_range(0, 255); J[y][x] = $urandom_range(0, 255);
      end
    run_frame();
    repeat (30) @(posedge clk);
    measure = 1;
    // smooth pattern moved one pixel to the right between J and I
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        I[y][x] = int'(128.0 + 50.0 * $sin(x / 3.0) + 50.0 * $cos(y / 2.5));
        J[y][x] = int'(128.0 + 50.0 * $sin((x - 1) / 3.0) + 50.0 * $cos(y / 2.5));
      end
    run_frame();
    repeat (30) @(posedge clk);
    checks++;
    if (der_q.size() != 0 || cov_q.size() != 0 || flow_q.size() != 0) begin failures++; $display("outputs missing"); end
    checks++;
    if (n_uv == 0 || sum_u / n_uv < 200 || sum_u / n_uv > 312 || sum_v / n_uv > 40 || sum_v / n_uv < -40) begin
      failures++; $display("moved pattern: mean u %0d v %0d (1/256 px) over %0d", sum_u / ((n_uv != 0) ? n_uv : 1), sum_v / ((n_uv != 0) ? n_uv : 1), n_uv);
    end
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
