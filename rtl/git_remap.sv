// git_remap: geometric image transformation. Resamples a pixel stream through
// a displacement map that the supervisor can rewrite while the system runs;
// in the stereo system it removes lens distortion and rectifies each camera
// image.
//
// Output pixel (xo, yo) takes the input pixel (xo+dx, yo+dy), nearest
// neighbour, where (dx, dy) is read from a map of one entry per 2^GS x 2^GS
// block of output pixels. dx may be any value in -128..127; dy is limited to
// -(D-1)..D-1 (values beyond are clamped), because the input is held in a ring
// of 2*D lines. A source outside the frame gives FILL. The map is written
// through map_we/map_addr/map_data (entry index = block row * MAP_W + block
// column, data = {dx, dy}, two's complement bytes); a write takes effect at
// once, so a change in mid-frame shows from that pixel on.
//
// The output stream has the input's format but runs exactly D lines behind
// it: the word that leaves with input word n is output pixel n - D*W of the
// frame sequence, so the last D lines of a frame leave during the first D
// lines of the next. Until D lines have arrived after reset the output is FILL.
// One output word per input word, one cycle after it.
// The document gives the function (an arbitrary geometric transformation,
// changeable at run time, for undistortion and rectification); the block map,
// the nearest-neighbour sampling, the ring of lines and the offset limits are
// this design's choices.
module git_remap #(
  parameter int unsigned   W    = ipf_pkg::IMG_W,
  parameter int unsigned   H    = ipf_pkg::IMG_H,
  parameter int unsigned   DW   = ipf_pkg::PIX_W,
  parameter int unsigned   D    = 8,       // line delay; ring holds 2*D lines
  parameter int unsigned   GS   = 4,       // log2 of the map block size
  parameter logic [DW-1:0] FILL = '0,
  localparam int unsigned  MAP_W = (W + (1 << GS) - 1) >> GS,
  localparam int unsigned  MAP_H = (H + (1 << GS) - 1) >> GS,
  localparam int unsigned  MAP_N = MAP_W * MAP_H
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [DW-1:0]            in_data,
  output logic                     out_valid,
  output logic [DW-1:0]            out_data,
  // supervisor map write port
  input  logic                     map_we,
  input  logic [$clog2(MAP_N)-1:0] map_addr,
  input  logic [15:0]              map_data
);
  localparam int NR  = 2 * D;
  localparam int RW  = $clog2(NR);
  localparam int XW  = $clog2(W);
  localparam int YW  = $clog2(H);
  localparam int SXW = XW + 2;             // signed source column
  localparam int SYW = YW + 2;
  localparam logic signed [7:0] DY_MAX = 8'(D - 1);

  initial assert ((NR & (NR - 1)) == 0) else $error("git_remap: 2*D must be a power of two");

  logic [DW-1:0] ring [NR][W];
  logic [15:0]   map  [MAP_N];

  logic [XW-1:0] x;            // input column
  logic [YW-1:0] yo;           // output row (input row - D, modulo H)
  logic [RW-1:0] r;            // ring slot of the input line
  logic [YW:0]   lines_seen;   // saturates at D
  wire           primed = (lines_seen >= (YW+1)'(D));

  always_ff @(posedge clk) begin
    if (map_we) map[map_addr] <= map_data;
  end

  // ---------------- source address ----------------
  logic signed [7:0]     dx, dy;
  logic signed [SXW-1:0] sx;
  logic signed [SYW-1:0] sy;
  logic [RW-1:0]         slot;
  logic                  in_img;

  always_comb begin
    logic [15:0] e;
    e  = map[(int'(yo) >> GS) * MAP_W + (int'(x) >> GS)];
    dx = e[15:8];
    dy = e[7:0];
    if (dy > DY_MAX)  dy = DY_MAX;
    if (dy < -DY_MAX) dy = -DY_MAX;
    sx = $signed(SXW'(x)) + SXW'(dx);
    sy = $signed(SYW'(yo)) + SYW'(dy);
    // the output line sits D lines behind the input line
    slot   = r - RW'(D) + RW'(dy);
    in_img = (sx >= 0) && (sx < $signed(SXW'(W))) && (sy >= 0) && (sy < $signed(SYW'(H)));
  end

  always_ff @(posedge clk) begin
    if (in_valid) ring[r][x] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; yo <= YW'(H - D); r <= '0; lines_seen <= '0;
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= (primed && in_img) ? ring[slot][sx[XW-1:0]] : FILL;
        if (x == XW'(W - 1)) begin
          x  <= '0;
          r  <= r + 1'b1;
          yo <= (yo == YW'(H - 1)) ? '0 : yo + 1'b1;
          if (!primed) lines_seen <= lines_seen + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

endmodule
