// box_sum: sum of a value stream over a causal K x K window, for N lanes at
// once. Used by the optical flow estimator to integrate the gradient products
// over its window.
//
// The input is a stream of W-wide frames in raster order. With the value at
// (x, y) the output, one cycle later, is the sum of the values at (x-i, y-j)
// for i, j in 0..K-1. K-1 line buffers give the vertical sum of a column; a
// shift register of the last K column sums gives the window. The caller knows
// the frame format and so which outputs have a window that lies inside the
// frame: for x < K-1 or y < K-1 the sum contains values of the previous line
// or frame and is to be ignored. Values are signed, VW bits; sums are VW +
// 2*clog2(K) bits. Part of this design's optical flow datapath.
module box_sum #(
  parameter int unsigned W  = ipf_pkg::IMG_W,
  parameter int unsigned K  = 5,
  parameter int unsigned N  = 1,
  parameter int unsigned VW = 18,
  localparam int unsigned SW = VW + 2 * $clog2(K)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [N-1:0][VW-1:0] in_v,
  output logic                        out_valid,
  output logic signed [N-1:0][SW-1:0] out_s
);
  localparam int XW = $clog2(W);

  logic [XW-1:0]           x;
  logic [N-1:0][VW-1:0]    lb   [K-1][W];
  logic [N-1:0][VW-1:0]    col  [K];
  logic [N-1:0][SW-1:0]    csum;            // vertical sum at column x
  logic [N-1:0][SW-1:0]    hsr  [K-1];      // column sums at x-1 .. x-K+1
  logic [N-1:0][SW-1:0]    wsum;

  always_comb begin
    col[0] = in_v;
    for (int j = 1; j < K; j++) col[j] = lb[j-1][x];
    for (int n = 0; n < N; n++) begin
      csum[n] = '0;
      for (int j = 0; j < K; j++) csum[n] += SW'(signed'(col[j][n]));
      wsum[n] = csum[n];
      for (int i = 0; i < K-1; i++) wsum[n] += hsr[i][n];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int j = 0; j < K-1; j++) lb[j][x] <= col[j];
      hsr[0] <= csum;
      for (int i = 1; i < K-1; i++) hsr[i] <= hsr[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      out_valid <= 1'b0;
      out_s <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_s <= wsum;
        x <= (x == XW'(W - 1)) ? '0 : x + 1'b1;
      end
    end
  end

endmodule
