// sdso: synchronized data source. Takes up to three equally formatted input
// streams that arrive loosely in step (for example from cameras whose frames
// start a few lines apart) and re-emits them pixel-synchronous: word i of
// every output stream leaves in the same cycle.
//
// Each input stream is written into its own FIFO of DEPTH words. Whenever all
// FIFOs hold a word, one word is taken from each and the NCH words leave
// together with out_valid, unmarked. When one stream runs so far ahead that
// its FIFO is full, synchronisation within the buffer size is impossible: the
// module then emits a word set anyway, taking the head of every non-empty FIFO
// and using a zero word for empty ones, and marks every word of that set
// invalid. The outputs thus keep the same word count and stay in step; the
// algorithm behind them sees which pixels could not be paired. desync counts
// such forced words.
//
// Timing: an output set leaves one cycle after the word that completed it
// was written. The document gives the function (pixel-accurate alignment of up
// to three streams, invalid-marked pixels when the buffers cannot cover the
// offset); the FIFO scheme, DEPTH and the marking of the whole set are this
// design's choices.
module sdso
  import ipf_pkg::*;
#(
  parameter int unsigned NCH   = 3,
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid [NCH],
  input  pix_t        in_data  [NCH],
  output logic        out_valid,
  output mpix_t       out_data [NCH],
  output logic [31:0] desync
);
  localparam int CW = $clog2(DEPTH + 1);

  logic          f_full  [NCH];
  logic          f_empty [NCH];
  pix_t          f_head  [NCH];
  logic [CW-1:0] f_count [NCH];
  logic          pop;
  logic          all_ready, any_full;

  always_comb begin
    all_ready = 1'b1;
    any_full  = 1'b0;
    for (int c = 0; c < NCH; c++) begin
      if (f_empty[c]) all_ready = 1'b0;
      if (f_full[c])  any_full  = 1'b1;
    end
  end

  assign pop = all_ready || any_full;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    sfifo #(.DW(PIX_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en  (in_valid[c]),
      .wr_data(in_data[c]),
      .rd_en  (pop),
      .rd_data(f_head[c]),
      .full   (f_full[c]),
      .empty  (f_empty[c]),
      .count  (f_count[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      desync    <= '0;
      for (int c = 0; c < NCH; c++) out_data[c] <= '0;
    end else begin
      out_valid <= pop;
      if (pop) begin
        for (int c = 0; c < NCH; c++) begin
          out_data[c].invalid <= !all_ready;
          out_data[c].value   <= f_empty[c] ? '0 : f_head[c];
        end
        if (!all_ready) desync <= desync + 1'b1;
      end
    end
  end

endmodule
