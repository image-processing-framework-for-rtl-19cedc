// mdso: memory data source. Reads frames from the external RAM over the system
// bus and delivers them as NCH pixel-synchronous output streams (for the
// optical flow: the current frame I and the preceding frame J).
//
// The supervisor writes one base address per stream and pulses start. The
// module then reads FRAME_WORDS stream words per stream, PER = BUS_DW/DW of
// them packed in each bus word (word k at bits k*DW upwards, as the memory
// data sink writes them). Reads are issued in strict rotation over the
// streams (beat 0 of stream 0, beat 0 of stream 1, ..., beat 1 of stream 0,
// ...), so the in-order read responses can be sorted back to the streams by
// a rotating counter. Each stream has a FIFO of DEPTH bus words, and a read is
// only issued while its stream has a free FIFO place counting the reads still
// in flight, so a response never finds its FIFO full. When every FIFO holds a
// word, one stream word of each leaves together with out_valid. After the
// last word done pulses and busy falls. This is how a live source can be
// replaced by stored or artificial images for debugging, too.
//
// The supervisor sets the pace: after each output set the module waits
// cfg_gap idle cycles, so that modules behind it, which take streams without
// back-pressure, are not fed faster than their outputs can be stored.
// Timing: one output set per cfg_gap+1 cycles at most, limited by the bus; the first
// set leaves a few cycles after the first read response.
// The document gives the function (RAM to one or several streams, bus and
// supervisor interfaces); the read scheme, packing and control signals are
// this design's choices.
module mdso
  import ipf_pkg::*;
#(
  parameter int unsigned NCH         = 2,
  parameter int unsigned DW          = PIX_W,
  parameter int unsigned FRAME_WORDS = IMG_W * IMG_H,
  parameter int unsigned DEPTH       = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // supervisor control interface
  input  logic              start,
  input  logic [BUS_AW-1:0] cfg_base [NCH],
  input  logic [15:0]       cfg_gap,        // idle cycles between output sets
  output logic              busy,
  output logic              done,
  // system bus master
  output bus_req_t          bus_req,
  input  bus_rsp_t          bus_rsp,
  // output streams
  output logic              out_valid,
  output logic [DW-1:0]     out_data [NCH]
);
  localparam int unsigned PER     = BUS_DW / DW;
  localparam int unsigned FRAME_B = (FRAME_WORDS + PER - 1) / PER;
  localparam int unsigned CHW     = (NCH <= 1) ? 1 : $clog2(NCH);
  localparam int unsigned BCW     = $clog2(FRAME_B + 1);
  localparam int unsigned FW      = $clog2(FRAME_WORDS + 1);
  localparam int unsigned KW      = (PER <= 1) ? 1 : $clog2(PER);
  localparam int unsigned CRW     = $clog2(DEPTH + 1);

  initial assert (DW <= BUS_DW) else $error("mdso: DW must not exceed BUS_DW");

  // ---------------- read issue ----------------
  logic [BCW-1:0] rd_beat;       // next beat to request
  logic [CHW-1:0] rd_ch;         // stream of the next request
  logic [CHW-1:0] rsp_ch;        // stream of the next response
  logic [CRW-1:0] credit [NCH];  // reads in flight plus words buffered
  logic           issuing;
  logic           pop;

  assign issuing = busy && (rd_beat != BCW'(FRAME_B)) &&
                   (credit[rd_ch] != CRW'(DEPTH));

  always_comb begin
    bus_req       = '0;
    bus_req.valid = issuing;
    bus_req.we    = 1'b0;
    bus_req.addr  = cfg_base[rd_ch] + BUS_AW'(rd_beat);
  end

  wire issued = issuing && bus_rsp.ready;

  // ---------------- per-stream FIFOs ----------------
  logic              f_empty [NCH];
  logic [BUS_DW-1:0] f_head  [NCH];
  logic              all_ready;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic f_full_unused;
    logic [$clog2(DEPTH+1)-1:0] f_cnt_unused;
    sfifo #(.DW(BUS_DW), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en  (bus_rsp.rvalid && rsp_ch == CHW'(c)),
      .wr_data(bus_rsp.rdata),
      .rd_en  (pop),
      .rd_data(f_head[c]),
      .full   (f_full_unused),
      .empty  (f_empty[c]),
      .count  (f_cnt_unused)
    );
  end

  always_comb begin
    all_ready = 1'b1;
    for (int c = 0; c < NCH; c++) if (f_empty[c]) all_ready = 1'b0;
  end

  // ---------------- unpacking ----------------
  logic [KW-1:0] k;
  logic [FW-1:0] words_out;
  logic [15:0]   gap;
  wire           emit      = busy && all_ready && (gap == '0);
  wire           last_word = (words_out == FW'(FRAME_WORDS - 1));
  assign pop = emit && ((k == KW'(PER - 1)) || last_word);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      rd_beat <= '0; rd_ch <= '0; rsp_ch <= '0;
      k <= '0; words_out <= '0; gap <= '0;
      out_valid <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        credit[c]   <= '0;
        out_data[c] <= '0;
      end
    end else begin
      done      <= 1'b0;
      out_valid <= emit;
      if (start && !busy) begin
        busy <= 1'b1;
        rd_beat <= '0; rd_ch <= '0; rsp_ch <= '0;
        k <= '0; words_out <= '0;
      end
      if (issued) begin
        if (rd_ch == CHW'(NCH - 1)) begin
          rd_ch   <= '0;
          rd_beat <= rd_beat + 1'b1;
        end else begin
          rd_ch <= rd_ch + 1'b1;
        end
      end
      if (bus_rsp.rvalid)
        rsp_ch <= (rsp_ch == CHW'(NCH - 1)) ? '0 : rsp_ch + 1'b1;
      for (int c = 0; c < NCH; c++) begin
        credit[c] <= credit[c] + CRW'(issued && rd_ch == CHW'(c)) - CRW'(pop);
      end
      if (emit)            gap <= cfg_gap;
      else if (gap != '0)  gap <= gap - 1'b1;
      if (emit) begin
        for (int c = 0; c < NCH; c++) out_data[c] <= f_head[c][k*DW +: DW];
        k <= pop ? '0 : k + 1'b1;
        if (last_word) begin
          busy <= 1'b0;
          done <= 1'b1;
          words_out <= '0;
        end else begin
          words_out <= words_out + 1'b1;
        end
      end
    end
  end

endmodule
