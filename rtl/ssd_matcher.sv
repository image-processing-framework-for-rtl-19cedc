// ssd_matcher: stereo block matcher. For every pixel of the left image it
// finds the disparity d in 0..DMAX whose BS x BS block in the right image,
// shifted d pixels to the left, has the lowest sum of squared differences
//   C(x, y, d) = sum over the block of (L(x, y) - R(x-d, y))^2,
// checks that this minimum is unique enough, refines it to a fraction of a
// pixel and delivers a disparity stream.
//
// The two inputs are one pixel-synchronous pair of streams (from the
// synchronising source), W x H frames in raster order, each pixel carrying
// the source's invalid mark. The cost volume is built incrementally:
//  * with each input pixel the squared differences of the new row y and of
//    the row y-BS leaving the block are formed for all disparities (a right
//    pixel left of column 0 costs 255^2), and a per-column sum over the last
//    BS rows, kept in a column-sum memory of W words x (DMAX+1) lanes, is
//    updated by adding the new and subtracting the old value;
//  * a running sum along the line adds the new column sum and subtracts the
//    one BS columns back, giving C for all disparities;
//  * a comparator tree takes the lowest cost (lowest d on a tie); a second
//    search finds the lowest cost at least two disparities away from it;
//  * the match is kept only if best * 16 <= second * (16 - UNIQ), so a flat,
//    low-textured block is rejected (uniqueness check);
//  * a parabola through the costs at d-1, d, d+1 gives the fraction
//    (C[d-1] - C[d+1]) / (2 (C[d-1] + C[d+1] - 2 C[d])) in 1/16 pixel steps.
//  * left-right check (LR = 1): the same cost vectors, read along the
//    diagonal, give for every right block the disparity with the lowest cost
//    seen from the right image, D_R(xr) = argmin_d C(xr + d, y, d). A chain
//    of DMAX+1 compare stages finishes one D_R per word. Each left result is
//    held back DMAX words until D_R(x - D) is known, and is kept only if
//    |D_R(x - D) - D| <= LR_TOL; this removes occluded pixels, which have
//    no true partner in the other image.
// Output word {ok, disparity} with disparity in unsigned fixed point,
// 4 fraction bits. ok is low where the block leaves the frame, where a pixel
// of the block carries the invalid mark, where the uniqueness check fails,
// or where the left-right check fails.
// Timing: one output per input. With LR = 0 the output leaving 4 cycles
// after input (x, y) is for the block centred on (x-(BS-1)/2, y-(BS-1)/2).
// With LR = 1 the output leaving 5 cycles after an input word belongs to the
// input word DMAX words earlier in the stream (so the last DMAX results of a
// frame come out with the first words of the next one; the first DMAX words
// after reset carry ok = 0).
// Block size 11x11 and the SSD cost follow the document, as do the
// uniqueness check, the left-right check and the sub-disparity step; DMAX,
// UNIQ, LR_TOL, the number formats, the incremental cost volume and the
// diagonal search for the right-referenced disparity are this design's
// choices.
module ssd_matcher
  import ipf_pkg::*;
#(
  parameter int unsigned W    = IMG_W,
  parameter int unsigned H    = IMG_H,
  parameter int unsigned BS   = 11,
  parameter int unsigned DMAX = 63,
  parameter int unsigned UNIQ = 2,
  parameter bit          LR   = 1'b1,
  parameter int unsigned LR_TOL = 1,
  localparam int unsigned ND  = DMAX + 1,
  localparam int unsigned DBW = (ND <= 2) ? 1 : $clog2(ND),
  localparam int unsigned OW  = DBW + 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  mpix_t         in_l,
  input  mpix_t         in_r,
  output logic          out_valid,
  output logic [OW:0]   out_data      // {ok, disparity (4 fraction bits)}
);
  localparam int XW  = $clog2(W);
  localparam int YW  = $clog2(H);
  localparam int SDW = 2 * PIX_W;                    // squared difference
  localparam int CSW = SDW + $clog2(BS) + 1;         // column sum
  localparam int WSW = CSW + $clog2(BS) + 1;         // block cost
  localparam logic [SDW-1:0] SD_MAX = {SDW{1'b1}} - SDW'((1 << (PIX_W + 1)) - 2);  // 255^2

  logic [XW-1:0] x;
  logic [YW-1:0] y;

  // ---------------- stage A: column sums ----------------
  pix_t lb_l [BS][W];            // rows y-1 .. y-BS
  pix_t lb_r [BS][W];
  pix_t rsr_new [ND];            // R(x-d, y), d = 1..DMAX at index d
  pix_t rsr_old [ND];            // R(x-d, y-BS)
  logic [ND-1:0][CSW-1:0] cs_mem [W];
  logic [ND-1:0][CSW-1:0] cs_prev, cs_new;

  pix_t l_old, r_old;
  assign l_old = lb_l[BS-1][x];
  assign r_old = lb_r[BS-1][x];
  assign cs_prev = cs_mem[x];

  function automatic logic [SDW-1:0] sqd(input pix_t a, input pix_t b);
    logic signed [PIX_W:0] d;
    d = $signed({1'b0, a}) - $signed({1'b0, b});
    return SDW'(d * d);
  endfunction

  always_comb begin
    for (int d = 0; d < ND; d++) begin
      logic [SDW-1:0] sn, so;
      pix_t rn, ro;
      rn = (d == 0) ? in_r.value : rsr_new[d];
      ro = (d == 0) ? r_old      : rsr_old[d];
      sn = (x >= XW'(d)) ? sqd(in_l.value, rn) : SD_MAX;
      so = (x >= XW'(d)) ? sqd(l_old, ro)      : SD_MAX;
      cs_new[d] = ((y == '0) ? '0 : cs_prev[d]) + CSW'(sn)
                  - ((y >= YW'(BS)) ? CSW'(so) : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_l[0][x] <= in_l.value;
      lb_r[0][x] <= in_r.value;
      for (int j = 1; j < BS; j++) begin
        lb_l[j][x] <= lb_l[j-1][x];
        lb_r[j][x] <= lb_r[j-1][x];
      end
      cs_mem[x] <= cs_new;
      rsr_new[1] <= in_r.value;
      rsr_old[1] <= r_old;
      for (int d = 2; d < ND; d++) begin
        rsr_new[d] <= rsr_new[d-1];
        rsr_old[d] <= rsr_old[d-1];
      end
    end
  end

  // invalid marks inside the block (same columns in both images)
  logic        mk_valid;
  logic [9:0]  mk_cnt;
  box_sum #(.W(W), .K(BS), .N(1), .VW(2)) u_marks (
    .clk, .rst_n,
    .in_valid(in_valid), .in_v(2'(in_l.invalid || in_r.invalid)),
    .out_valid(mk_valid), .out_s(mk_cnt)
  );

  logic                   a_valid, a_first, a_edge, a_inside;
  logic [XW-1:0]          a_x;
    logic [ND-1:0][CSW-1:0] a_cs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0;
      a_valid <= 1'b0; a_first <= 1'b0; a_edge <= 1'b0; a_inside <= 1'b0;
      a_x <= '0;
      a_cs <= '0;
    end else begin
      a_valid <= in_valid;
      if (in_valid) begin
        a_cs     <= cs_new;
        a_first  <= (x == '0);
        a_x      <= x;
        a_edge   <= (x >= XW'(BS));
        a_inside <= (x >= XW'(BS - 1)) && (y >= YW'(BS - 1));
        if (x == XW'(W - 1)) begin
          x <= '0;
          y <= (y == YW'(H - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

  // ---------------- stage B: block costs ----------------
  logic [ND-1:0][CSW-1:0] hist [BS];     // column sums BS columns back
  logic [ND-1:0][WSW-1:0] ws, ws_new;

  always_comb begin
    for (int d = 0; d < ND; d++)
      ws_new[d] = (a_first ? '0 : ws[d]) + WSW'(a_cs[d])
                  - (a_edge ? WSW'(hist[BS-1][d]) : '0);
  end

  logic       b_valid, b_inside;
  logic [XW-1:0] b_x;
  logic [9:0] b_marks;
  always_ff @(posedge clk) begin
    if (a_valid) begin
      hist[0] <= a_cs;
      for (int i = 1; i < BS; i++) hist[i] <= hist[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= '0; b_valid <= 1'b0; b_inside <= 1'b0; b_marks <= '0;
      b_x <= '0;
    end else begin
      b_valid <= a_valid;
      if (a_valid) begin
        ws       <= ws_new;
        b_inside <= a_inside;
        b_x      <= a_x;
        b_marks  <= mk_valid ? mk_cnt : '1;
      end
    end
  end

  // ---------------- right-referenced search (left-right check) ----------------
  // rmin[k] holds the best (cost, d) found so far for the right block ending
  // k columns before the current one: lane k of the current cost vector is
  // exactly that block matched against the current left block. The entry
  // leaving at k = DMAX has seen all its disparities.
  typedef struct packed {
    logic [WSW-1:0] c;
    logic [DBW-1:0] d;
  } rcand_t;
  rcand_t rmin [ND];
  rcand_t rnext [ND];
  always_comb begin
    for (int k = 0; k < ND; k++) begin
      logic [WSW-1:0] cc;
      // the right block must lie in this line (and not wrap from the last)
      cc = (int'(b_x) >= k + int'(BS) - 1) ? ws[k] : '1;
      if (k == 0)                   rnext[k] = '{c: cc, d: '0};
      else if (cc < rmin[k - 1].c)  rnext[k] = '{c: cc, d: DBW'(k)};
      else                          rnext[k] = rmin[k - 1];
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ND; k++) rmin[k] <= '{c: '1, d: '0};
    end else if (b_valid) begin
      rmin <= rnext;
    end
  end

  // ---------------- stage C: best disparity ----------------
  logic [WSW-1:0] best_c;
  logic [DBW-1:0] best_d;
  always_comb begin
    best_c = ws[0];
    best_d = '0;
    for (int d = 1; d < ND; d++)
      if (ws[d] < best_c) begin
        best_c = ws[d];
        best_d = DBW'(d);
      end
  end

  logic                   c_valid, c_ok;
  logic [DBW-1:0]         c_d;
  logic [XW-1:0]          c_x;
  rcand_t                 c_dr;        // right-referenced result, DMAX words back
  logic [WSW-1:0]         c_best, c_lo, c_hi;
  logic [ND-1:0][WSW-1:0] c_ws;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0; c_ok <= 1'b0; c_d <= '0;
      c_best <= '0; c_lo <= '0; c_hi <= '0; c_ws <= '0;
      c_x <= '0; c_dr <= '{c: '1, d: '0};
    end else begin
      c_valid <= b_valid;
      if (b_valid) begin
        c_ok   <= b_inside && (b_marks == '0);
        c_x    <= b_x;
        c_dr   <= rnext[ND - 1];
        c_d    <= best_d;
        c_best <= best_c;
        c_lo   <= (best_d == '0)            ? best_c : ws[best_d - 1'b1];
        c_hi   <= (best_d == DBW'(ND - 1))  ? best_c : ws[best_d + 1'b1];
        c_ws   <= ws;
      end
    end
  end

  // ---------------- stage D: uniqueness and sub-disparity ----------------
  logic [WSW-1:0] second_c;
  always_comb begin
    second_c = '1;
    for (int d = 0; d < ND; d++)
      if ((d + 1 < int'(c_d) || d > int'(c_d) + 1) && c_ws[d] < second_c)
        second_c = c_ws[d];
  end

  wire unique_ok = ((WSW + 5)'(c_best) * 16) <= ((WSW + 5)'(second_c) * (16 - UNIQ));

  // fraction f in 1/16 pixel: f = 16*(lo - hi) / (2*(lo + hi - 2*best)), |f| <= 8
  logic signed [5:0] frac;
  always_comb begin
    logic [WSW+4:0] num, den, rem;
    logic [3:0]     q;
    logic           neg;
    neg = c_hi > c_lo;
    num = neg ? (WSW+5)'(c_hi - c_lo) : (WSW+5)'(c_lo - c_hi);
    den = (WSW+5)'(c_lo) + (WSW+5)'(c_hi) - ((WSW+5)'(c_best) << 1);
    // q = floor(8 * num / den); num <= den by choice of the minimum
    rem = num << 3;
    q   = '0;
    for (int i = 3; i >= 0; i--) begin
      if (den != '0 && rem >= (den << i)) begin
        q[i] = 1'b1;
        rem  = rem - (den << i);
      end
    end
    frac = (den == '0 || c_d == '0 || c_d == DBW'(ND - 1)) ? '0 :
           (neg ? -$signed({2'b0, q}) : $signed({2'b0, q}));
  end

  logic signed [OW+1:0] fx;
  assign fx = $signed({2'b0, c_d, 4'b0}) + (OW+2)'(frac);

  // result of the single-sided search, with what the left-right check needs
  logic          m_valid, m_ok, m_lrin, m_drok;
  logic [OW-1:0] m_disp;
  logic [DBW-1:0] m_d, m_dr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0; m_ok <= 1'b0; m_disp <= '0; m_d <= '0;
      m_lrin <= 1'b0; m_drok <= 1'b0; m_dr <= '0;
    end else begin
      m_valid <= c_valid;
      if (c_valid) begin
        m_ok   <= c_ok && unique_ok;
        m_disp <= (fx < 0) ? OW'(0) : OW'(fx);
        m_d    <= c_d;
        // the matching right block lies inside this line
        m_lrin <= int'(c_x) >= int'(c_d) + int'(BS) - 1;
        m_drok <= c_dr.c != '1;
        m_dr   <= c_dr.d;
      end
    end
  end

  // ---------------- stage E: left-right consistency ----------------
  // A left result is held back DMAX words, until the right-referenced
  // search has finished every right block it may point at; drh[j] then
  // holds the right-referenced disparity of the block j columns left of it.
  if (LR) begin : g_lr
    typedef struct packed {
      logic           ok;
      logic           lrin;
      logic [DBW-1:0] d;
      logic [OW-1:0]  disp;
    } lword_t;
    lword_t         dl  [DMAX];
    logic [DBW:0]   drh [ND];          // {valid, d}
    logic [DBW:0]   drh_now [ND];
    lword_t         wl;
    logic [DBW:0]   hit;
    logic           agree;

    always_comb begin
      drh_now[0] = {m_drok, m_dr};
      for (int j = 1; j < ND; j++) drh_now[j] = drh[j - 1];
      wl    = dl[DMAX - 1];
      hit   = drh_now[wl.d];
      agree = hit[DBW] &&
              ((hit[DBW-1:0] > wl.d) ? (hit[DBW-1:0] - wl.d) : (wl.d - hit[DBW-1:0]))
                <= DBW'(LR_TOL);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < DMAX; j++) dl[j] <= '0;
        for (int j = 0; j < ND; j++)   drh[j] <= '0;
        out_valid <= 1'b0; out_data <= '0;
      end else begin
        out_valid <= m_valid;
        if (m_valid) begin
          dl[0] <= '{ok: m_ok, lrin: m_lrin, d: m_d, disp: m_disp};
          for (int j = 1; j < DMAX; j++) dl[j] <= dl[j - 1];
          drh <= drh_now;
          out_data <= {wl.ok && wl.lrin && agree, wl.disp};
        end
      end
    end
  end else begin : g_nolr
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0; out_data <= '0;
      end else begin
        out_valid <= m_valid;
        if (m_valid) out_data <= {m_ok, m_disp};
      end
    end
  end

endmodule
