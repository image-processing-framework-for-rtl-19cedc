// sep_conv: separable convolution, a 2D finite impulse response filter built
// as a vertical K-tap filter followed by a horizontal K-tap filter. In the
// vision system four of them in a chain low-pass the camera image with a
// Gaussian kernel to build an image pyramid.
//
// Input and output are pixel streams of W x H frames in raster order, one
// output word per input word. K-1 line buffers hold the previous rows, so with
// each input pixel at (x, y) a column of K pixels (rows y..y-K+1) is at hand.
// The vertical pass forms v = (sum_j COEF_V[j]*col[j] + 2^(SHIFT_V-1)) >>
// SHIFT_V; a shift register holds the last K vertical results of the line
// and the horizontal pass forms the output the same way with COEF_H/SHIFT_H.
// Taps that fall above row 0 or left of column 0 take the value of row 0 or
// column 0 (edge replication). The output word that leaves with input (x, y)
// is the filter centred on (x-(K-1)/2, y-(K-1)/2): the stream format stays
// the same, and the image moves by half a kernel towards the top left, which
// is the price of filtering a stream without a flush at the end of a frame.
// Results are clamped to 2^DW-1.
//
// Timing: out_valid follows in_valid two cycles later; one pixel per cycle.
// The document gives the function (separable 2D FIR, coefficients fixed at
// build time, Gaussian in the pyramid); the 5-tap binomial kernel, the
// rounding, the border rule and the output alignment are this design's.
module sep_conv #(
  parameter int unsigned W          = ipf_pkg::IMG_W,
  parameter int unsigned H          = ipf_pkg::IMG_H,
  parameter int unsigned DW         = ipf_pkg::PIX_W,
  parameter int unsigned K          = 5,
  parameter int unsigned COEF_V [K] = '{1, 4, 6, 4, 1},
  parameter int unsigned COEF_H [K] = '{1, 4, 6, 4, 1},
  parameter int unsigned SHIFT_V    = 4,
  parameter int unsigned SHIFT_H    = 4,
  parameter int unsigned CW         = 8        // coefficient width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  output logic [DW-1:0] out_data
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);
  localparam int AW = DW + CW + $clog2(K) + 1;   // accumulator width

  logic [XW-1:0] x;
  logic [YW-1:0] y;

  // ---------------- line buffers ----------------
  logic [DW-1:0] lb [K-1][W];
  logic [DW-1:0] col [K];      // col[j] = pixel (x, y-j)

  always_comb begin
    col[0] = in_data;
    for (int j = 1; j < K; j++) col[j] = lb[j-1][x];
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int j = 0; j < K-1; j++) lb[j][x] <= col[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0;
    end else if (in_valid) begin
      if (x == XW'(W - 1)) begin
        x <= '0;
        y <= (y == YW'(H - 1)) ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  // ---------------- vertical pass ----------------
  function automatic logic [DW-1:0] round_clamp(input logic [AW-1:0] acc,
                                                input int unsigned sh);
    logic [AW-1:0] r;
    r = (sh == 0) ? acc : (acc + (AW'(1) << (sh - 1))) >> sh;
    return (r > AW'({DW{1'b1}})) ? {DW{1'b1}} : r[DW-1:0];
  endfunction

  logic [AW-1:0] vacc;
  always_comb begin
    logic [DW-1:0] t;
    vacc = '0;
    for (int j = 0; j < K; j++) begin
      t = col[j];
      for (int i = 0; i < K; i++)     // replicate row 0 above the frame
        if (YW'(i) == y && j > i) t = col[i];
      vacc += AW'(COEF_V[j]) * AW'(t);
    end
  end

  logic          v_valid;
  logic [DW-1:0] v_data;
  logic [XW-1:0] v_x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_valid <= 1'b0; v_data <= '0; v_x <= '0;
    end else begin
      v_valid <= in_valid;
      if (in_valid) begin
        v_data <= round_clamp(vacc, SHIFT_V);
        v_x    <= x;
      end
    end
  end

  // ---------------- horizontal pass ----------------
  logic [DW-1:0] hs  [K-1];    // hs[j] = vertical result at column v_x-1-j
  logic [DW-1:0] win [K];
  logic [AW-1:0] hacc;

  always_comb begin
    win[0] = v_data;
    for (int j = 1; j < K; j++) win[j] = hs[j-1];
    hacc = '0;
    for (int j = 0; j < K; j++) begin
      logic [DW-1:0] t;
      t = win[j];
      for (int i = 0; i < K; i++)     // replicate column 0 left of the frame
        if (XW'(i) == v_x && j > i) t = win[i];
      hacc += AW'(COEF_H[j]) * AW'(t);
    end
  end

  always_ff @(posedge clk) begin
    if (v_valid) begin
      hs[0] <= v_data;
      for (int j = 1; j < K-1; j++) hs[j] <= hs[j-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= v_valid;
      if (v_valid) out_data <= round_clamp(hacc, SHIFT_H);
    end
  end

endmodule
