// lk_div: pipelined signed divider with saturation, for the optical flow
// solver. Computes q = trunc(num / den) for a non-negative divisor, one
// division per cycle, QW+1 cycles of latency (one stage per quotient bit plus
// an input stage). The quotient is a QW+1 bit two's complement number; a
// magnitude of 2^QW or more saturates to +/-(2^QW - 1). A zero divisor gives
// zero with zero_den set. A TW-bit tag travels with each division.
// A restoring shift-and-subtract divider: stage i subtracts den << i from the
// remainder when it fits and sets quotient bit i. This is this design's
// choice; the document only states the equation the divider serves.
module lk_div #(
  parameter int unsigned NW = 56,   // numerator width (signed)
  parameter int unsigned DW = 46,   // divisor width (unsigned)
  parameter int unsigned QW = 15,   // quotient magnitude bits
  parameter int unsigned TW = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [NW-1:0] num,
  input  logic [DW-1:0]        den,
  input  logic [TW-1:0]        in_tag,
  output logic                 out_valid,
  output logic signed [QW:0]   quo,
  output logic                 zero_den,
  output logic [TW-1:0]        out_tag
);
  localparam int RW = NW + 1;                 // remainder (magnitude) width
  localparam int EW = DW + QW + 1;            // shifted divisor width
  localparam int CW = (RW > EW) ? RW : EW;    // compare width

  typedef struct packed {
    logic          valid;
    logic          neg;
    logic          zero;
    logic          sat;
    logic [CW-1:0] rem;
    logic [DW-1:0] den;
    logic [QW-1:0] q;
    logic [TW-1:0] tag;
  } stage_t;

  stage_t st [QW+1];

  // input stage: magnitude, sign and overflow test
  logic [CW-1:0] mag;
  assign mag = num[NW-1] ? CW'(-RW'(num)) : CW'(RW'(num));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else begin
      st[0].valid <= in_valid;
      st[0].neg   <= num[NW-1];
      st[0].zero  <= (den == '0);
      st[0].sat   <= (mag >= (CW'(den) << QW));
      st[0].rem   <= mag;
      st[0].den   <= den;
      st[0].q     <= '0;
      st[0].tag   <= in_tag;
    end
  end

  for (genvar s = 0; s < QW; s++) begin : g_stage
    localparam int B = QW - 1 - s;            // quotient bit decided here
    logic [CW-1:0] sub;
    assign sub = CW'(st[s].den) << B;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[s+1] <= '0;
      end else begin
        st[s+1] <= st[s];
        if (st[s].rem >= sub) begin
          st[s+1].rem  <= st[s].rem - sub;
          st[s+1].q[B] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    stage_t o;
    logic [QW-1:0] m;
    o = st[QW];
    m = o.sat ? {QW{1'b1}} : o.q;
    out_valid = o.valid;
    zero_den  = o.zero;
    out_tag   = o.tag;
    if (o.zero)     quo = '0;
    else if (o.neg) quo = -(QW+1)'(m);
    else            quo = (QW+1)'(m);
  end

endmodule
