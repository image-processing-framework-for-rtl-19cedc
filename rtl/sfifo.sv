// sfifo: synchronous first-in first-out buffer, used by the IO modules.
//
// A memory of DEPTH words with separate read and write pointers. A write to a
// full FIFO is ignored unless a word is read in the same cycle; a read when
// empty is ignored. Callers check full/empty. rd_data shows the head word
// combinationally (first-word fall-through), so a read takes effect at the
// next clock edge. count gives the number of stored words.
// This helper is part of this design, not of the framework's description.
module sfifo #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [DW-1:0]              wr_data,
  input  logic                       rd_en,
  output logic [DW-1:0]              rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH <= 2) ? 1 : $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rp];

  wire do_wr = wr_en && (!full || rd_en);
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + ($bits(count))'(do_wr) - ($bits(count))'(do_rd);
    end
  end

endmodule
