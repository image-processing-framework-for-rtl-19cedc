// tb_ssd_matcher: self-checking testbench of the SSD block matcher with the
// 11x11 block, on 48x26 frames and disparities 0..15. The right image is
// random texture; the left image is the right one moved by a true disparity
// of 5 (upper part) or 9 (lower part), with a flat grey band that makes the
// match ambiguous, and, in the second frame, a few pixels marked invalid.
// Every output is compared with a reference computed here from the SSD
// definition: lowest-cost disparity, second-best cost two or more steps
// away, the uniqueness test, the parabola fraction in 1/16 steps, and the
// ok bit (block inside the frame, no marked pixel, unique, and consistent
// with the disparity found from the right image within one step). Results
// are expected DMAX words after their input, 5 cycles after the word that
// releases them; accepted, rejected-as-ambiguous, rejected by the
// left-right check and rejected-as-marked outputs must all occur.
module tb_ssd_matcher;
  import ipf_pkg::*;
  localparam int W = 48, H = 26, BS = 11, DMAX = 15, ND = DMAX + 1, UNIQ = 2;
  localparam int OW = 4 + 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  mpix_t in_l = '0, in_r = '0;
  logic out_valid;
  logic [OW:0] out_data;
  int checks = 0, failures = 0;
  int n_ok = 0, n_ambig = 0, n_marked = 0, n_exact = 0, n_lr = 0;

  ssd_matcher #(.W(W), .H(H), .BS(BS), .DMAX(DMAX), .UNIQ(UNIQ)) dut (.*);
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int L [H][W], R [H][W];
  bit M [H][W];
  longint Cst [H][W][ND];             // cost of the block ending at (x, y)
  int exp_q [$], t_q [$], kind_q [$];   // kind: 0 border, 1 marked, 2 compare, 3 compare (left-right reject)

  function automatic longint sd(int x, int y, int d);
    if (x < d) return 65025;
    return (longint'(L[y][x]) - longint'(R[y][x - d])) * (longint'(L[y][x]) - longint'(R[y][x - d]));
  endfunction

  // right-referenced disparity of the right block ending at (xr, y):
  // lowest cost over the left blocks xr + d still in the line
  function automatic int dr(int xr, int y);
    longint b;
    int bd;
    b = Cst[y][xr][0]; bd = 0;
    for (int d = 1; d < ND && xr + d < W; d++)
      if (Cst[y][xr + d][d] < b) begin b = Cst[y][xr + d][d]; bd = d; end
    return bd;
  endfunction

  // loop bounds held in variables so the reference loops stay loops
  int n_bs, n_nd, n_w, n_h;
  task automatic costs();
    for (int y = n_bs - 1; y < n_h; y++)
      for (int x = n_bs - 1; x < n_w; x++)
        for (int d = 0; d < n_nd; d++) begin
          Cst[y][x][d] = 0;
          for (int j = 0; j < n_bs; j++)
            for (int i = 0; i < n_bs; i++) Cst[y][x][d] += sd(x - i, y - j, d);
        end
  endtask

  task automatic expect_at(int x, int y, int t);
    longint c [ND];
    longint best, second, lo, hi, num, den;
    int bd, q, fx, kind;
    bit marked, uniq, lr;
    if (x < BS - 1 || y < BS - 1) begin
      exp_q.push_back(0); t_q.push_back(t); kind_q.push_back(0);
      return;
    end
    marked = 0;
    for (int j = 0; j < BS; j++)
      for (int i = 0; i < BS; i++) if (M[y - j][x - i]) marked = 1;
    for (int d = 0; d < ND; d++) c[d] = Cst[y][x][d];
    best = c[0]; bd = 0;
    for (int d = 1; d < ND; d++) if (c[d] < best) begin best = c[d]; bd = d; end
    second = 64'h7fffffffffff;
    for (int d = 0; d < ND; d++) if ((d + 1 < bd || d > bd + 1) && c[d] < second) second = c[d];
    uniq = best * 16 <= second * (longint'(16) - longint'(UNIQ));
    lo = (bd == 0) ? best : c[bd - 1];
    hi = (bd == DMAX) ? best : c[bd + 1];
    num = hi > lo ? hi - lo : lo - hi;
    den = lo + hi - 2 * best;
    q = (den == 0) ? 0 : int'((8 * num) / den);
    if (den == 0 || bd == 0 || bd == DMAX) q = 0;
    fx = bd * 16 + (hi > lo ? -q : q);
    if (fx < 0) fx = 0;
    // left-right check: the right block at x - bd, searched the other way
    lr = 0;
    if (x - bd >= BS - 1) lr = (dr(x - bd, y) - bd <= 1) && (bd - dr(x - bd, y) <= 1);
    kind = marked ? 1 : ((uniq && !lr) ? 3 : 2);
    exp_q.push_back(int'({(!marked && uniq && lr), 8'(fx)})); t_q.push_back(t); kind_q.push_back(kind);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int e, t, k;
    e = exp_q.pop_front(); t = t_q.pop_front(); k = kind_q.pop_front();
    checks += 2;
    if (cyc != t + 5) begin failures++; $display("latency %0d", cyc - t); end
    if (k == 3) n_lr++;
    if (k >= 2) begin
      if (out_data != 9'(e)) begin
        failures++; if (failures < 10) $display("got %h exp %h", out_data, e);
      end
      if (out_data[OW]) n_ok++; else n_ambig++;
    end else begin
      if (out_data[OW]) begin failures++; $display("ok outside the frame or on a mark"); end
      if (k == 1) n_marked++;
    end
  end

  task automatic run_frame(bit with_marks);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        R[y][x] = $urandom_range(0, 255);
        M[y][x] = 0;
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int dt;
        dt = (y < H / 2) ? 5 : 9;
        L[y][x] = (x >= dt) ? R[y][x - dt] : $urandom_range(0, 255);
        if (y >= 14 && y < 16) begin L[y][x] = 100; R[y][x] = 100; end
      end
    for (int y = 0; y < H; y++)            // flat band
      for (int x = 30; x < W; x++)
        if (y >= 2 && y < 12) begin L[y][x] = 90; R[y][x] = 90; end
    if (with_marks) begin M[20][25] = 1; M[22][40] = 1; end
    costs();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        in_valid = 1;
        in_l = '{invalid: M[y][x], value: 8'(L[y][x])};
        in_r = '{invalid: 1'b0, value: 8'(R[y][x])};
        expect_at(x, y, cyc);
        @(negedge clk);
        in_valid = 0;
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    n_bs = BS; n_nd = ND; n_w = W; n_h = H;
    rst_n = 1;
    // the first DMAX outputs come from the empty left-right delay line
    repeat (DMAX) begin exp_q.push_back(0); kind_q.push_back(0); end
    run_frame(0);
    run_frame(1);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != DMAX || t_q.size() != 0) begin failures++; $display("outputs missing"); end
    checks++;
    if (n_ok == 0 || n_ambig == 0 || n_marked == 0 || n_lr == 0) begin
      failures++; $display("mechanisms: ok %0d ambiguous %0d marked %0d", n_ok, n_ambig, n_marked);
    end
    $display("accepted %0d, rejected (uniqueness or left-right) %0d, of those by left-right %0d, marked %0d",
             n_ok, n_ambig, n_lr, n_marked);
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
