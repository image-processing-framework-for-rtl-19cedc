// lk_flow: Lucas-Kanade optical flow estimator. Takes the current frame I and
// the preceding frame J as two pixel-synchronous streams and delivers three
// streams: the optical flow, the spatial derivatives and the covariance
// matrix. It knows nothing of the framework beyond its stream interfaces.
//
// Per pixel the estimator computes
//   Ix = I(x+1,y) - I(x-1,y),  Iy = I(x,y+1) - I(x,y-1),  dI = I - J,
// i.e. twice the central-difference derivatives, then integrates over a
// K x K window (K = 2w+1) the structure tensor G = sum [Ix^2 IxIy; IxIy Iy^2]
// and the mismatch vector b = sum [dI*Ix; dI*Iy], and solves eta = G^-1 b.
// With the factor two of the derivatives undone, the flow in pixels is
//   u = 2*(Gyy*bx - Gxy*by)/det,  v = 2*(Gxx*by - Gxy*bx)/det,
//   det = Gxx*Gyy - Gxy^2,
// delivered as signed fixed point with FRAC fraction bits, saturated to
// 16 bits. Two pipelined dividers do the division at one pixel per clock.
//
// Streams (one output word per input word on each, the position being a
// fixed distance behind the input as stated):
//   der  = {ok, Ix[8:0], Iy[8:0]}           at (x-1, y-1)
//   cov  = {ok, det, Gyy, -Gxy, Gxx}        at (x-1-w, y-1-w); G^-1 is the
//          matrix [Gyy -Gxy; -Gxy Gxx] / det (in the doubled derivative units)
//   flow = {ok, u[15:0], v[15:0]}           at (x-1-w, y-1-w)
// ok is low where the derivative or the window leaves the frame; for the flow
// also where det = 0. Latencies: der 1 cycle, cov 3 cycles, flow 3+QW+1
// cycles after the input word.
// The algorithm follows the document; the window size, number formats,
// border handling and the form of the covariance output are this design's.
module lk_flow #(
  parameter int unsigned W    = ipf_pkg::IMG_W,
  parameter int unsigned H    = ipf_pkg::IMG_H,
  parameter int unsigned WIN  = 2,          // w: window is (2w+1)^2
  parameter int unsigned FRAC = 8,
  localparam int unsigned K   = 2 * WIN + 1,
  localparam int unsigned PW  = 18,                     // product width
  localparam int unsigned GW  = PW + 2 * $clog2(K),     // window sum width
  localparam int unsigned DTW = 2 * GW,                 // det width
  localparam int unsigned COVW = 1 + DTW + 3 * GW,
  localparam int unsigned QW  = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [7:0]            in_i,
  input  logic [7:0]            in_j,
  output logic                  flow_valid,
  output logic [32:0]           flow_data,
  output logic                  der_valid,
  output logic [18:0]           der_data,
  output logic                  cov_valid,
  output logic [COVW-1:0]       cov_data
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);

  // ---------------- derivative stage ----------------
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [7:0] lb_i1 [W];   // I, row y-1
  logic [7:0] lb_i2 [W];   // I, row y-2
  logic [7:0] lb_j1 [W];   // J, row y-1
  logic [7:0] i_y0_d, i_y1_d1, i_y1_d2, i_y2_d, j_y1_d;   // column delays

  wire [7:0] i_y1 = lb_i1[x];
  wire [7:0] i_y2 = lb_i2[x];
  wire [7:0] j_y1 = lb_j1[x];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_i1[x] <= in_i;
      lb_i2[x] <= i_y1;
      lb_j1[x] <= in_j;
      i_y0_d  <= in_i;
      i_y1_d1 <= i_y1;
      i_y1_d2 <= i_y1_d1;
      i_y2_d  <= i_y2;
      j_y1_d  <= j_y1;
    end
  end

  logic              d_valid, d_ok;
  logic signed [8:0] d_ix, d_iy, d_di;
  logic [XW-1:0]     d_x;
  logic [YW-1:0]     d_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0;
      d_valid <= 1'b0; d_ok <= 1'b0;
      d_ix <= '0; d_iy <= '0; d_di <= '0; d_x <= '0; d_y <= '0;
    end else begin
      d_valid <= in_valid;
      if (in_valid) begin
        // centre (x-1, y-1)
        d_ok <= (x >= XW'(2)) && (y >= YW'(2));
        d_ix <= $signed({1'b0, i_y1})    - $signed({1'b0, i_y1_d2});
        d_iy <= $signed({1'b0, i_y0_d})  - $signed({1'b0, i_y2_d});
        d_di <= $signed({1'b0, i_y1_d1}) - $signed({1'b0, j_y1_d});
        d_x  <= x;
        d_y  <= y;
        if (x == XW'(W - 1)) begin
          x <= '0;
          y <= (y == YW'(H - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

  assign der_valid = d_valid;
  assign der_data  = {d_ok, d_ix, d_iy};

  // ---------------- products and window sums ----------------
  logic signed [4:0][PW-1:0] prod;
  always_comb begin
    if (d_ok) begin
      prod[0] = PW'(d_ix * d_ix);
      prod[1] = PW'(d_ix * d_iy);
      prod[2] = PW'(d_iy * d_iy);
      prod[3] = PW'(d_di * d_ix);
      prod[4] = PW'(d_di * d_iy);
    end else begin
      prod = '0;
    end
  end

  logic                      s_valid;
  logic signed [4:0][GW-1:0] s_sum;
  logic                      s_ok;

  box_sum #(.W(W), .K(K), .N(5), .VW(PW)) u_box (
    .clk, .rst_n,
    .in_valid(d_valid), .in_v(prod),
    .out_valid(s_valid), .out_s(s_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_ok <= 1'b0;
    else if (d_valid) s_ok <= (d_x >= XW'(K + 1)) && (d_y >= YW'(K + 1));
  end

  // ---------------- solver ----------------
  localparam int NW = DTW + FRAC + 3;
  wire signed [GW-1:0] gxx = s_sum[0];
  wire signed [GW-1:0] gxy = s_sum[1];
  wire signed [GW-1:0] gyy = s_sum[2];
  wire signed [GW-1:0] bx  = s_sum[3];
  wire signed [GW-1:0] by  = s_sum[4];

  logic                  m_valid, m_ok;
  logic signed [DTW:0]   m_det, m_nu, m_nv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0; m_ok <= 1'b0;
      m_det <= '0; m_nu <= '0; m_nv <= '0;
      cov_valid <= 1'b0; cov_data <= '0;
    end else begin
      m_valid <= s_valid;
      if (s_valid) begin
        m_ok  <= s_ok;
        m_det <= (DTW+1)'(gxx * gyy) - (DTW+1)'(gxy * gxy);
        m_nu  <= (DTW+1)'(gyy * bx)  - (DTW+1)'(gxy * by);
        m_nv  <= (DTW+1)'(gxx * by)  - (DTW+1)'(gxy * bx);
      end
      cov_valid <= s_valid;
      if (s_valid)
        cov_data <= {s_ok, DTW'((DTW+1)'(gxx * gyy) - (DTW+1)'(gxy * gxy)),
                     gyy, GW'(-gxy), gxx};
    end
  end

  // numerators scaled by 2^(FRAC+1): the 2 undoes the doubled derivatives
  wire signed [NW-1:0] num_u = NW'(m_nu) <<< (FRAC + 1);
  wire signed [NW-1:0] num_v = NW'(m_nv) <<< (FRAC + 1);
  wire [DTW-1:0]       den   = m_det[DTW] ? '0 : m_det[DTW-1:0];

  logic               q_valid, q_zero, q_ok;
  logic signed [QW:0] q_u, q_v;
  logic               unused_valid, unused_zero, unused_ok;

  lk_div #(.NW(NW), .DW(DTW), .QW(QW), .TW(1)) u_div_u (
    .clk, .rst_n,
    .in_valid(m_valid), .num(num_u), .den(den), .in_tag(m_ok),
    .out_valid(q_valid), .quo(q_u), .zero_den(q_zero), .out_tag(q_ok)
  );
  lk_div #(.NW(NW), .DW(DTW), .QW(QW), .TW(1)) u_div_v (
    .clk, .rst_n,
    .in_valid(m_valid), .num(num_v), .den(den), .in_tag(m_ok),
    .out_valid(unused_valid), .quo(q_v), .zero_den(unused_zero), .out_tag(unused_ok)
  );

  assign flow_valid = q_valid;
  assign flow_data  = {q_ok && !q_zero, q_u, q_v};

endmodule
