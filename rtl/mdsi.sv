// mdsi: memory data sink. Takes one stream and writes it, in order, into frame
// buffers in the external RAM over the system bus, and tells the supervisor
// when a complete frame is in memory.
//
// Stream words of DW bits are packed into groups: PER = BUS_DW/DW words per
// group when a word is narrower than the bus, else one word per group. A group
// occupies BEATS bus words (word k of a group sits at bits k*DW upwards). The
// groups wait in a FIFO of FIFO_G groups; the bus side sends them as packets
// of PKT_G groups to consecutive word addresses, holding the bus lock for the
// whole packet. The last packet of a frame may be shorter, and the last group
// of a frame may be partly filled. The frame size is fixed at build time
// (FRAME_WORDS stream words), as the stream format is.
// NBUF frame buffers start at cfg_base + b*cfg_stride; frames go to them in
// turn. When the last beat of a frame is accepted by the bus, frame_irq
// pulses for one cycle and frame_buf names the buffer just filled, so the
// supervisor can hand it to the host. A stream word that finds the FIFO full
// is lost and sets the sticky overflow flag.
//
// Control: cfg_enable gates the input; set cfg_base/cfg_stride before the
// first word of a frame. The document gives the function (packetize, address,
// write to frame buffers, inform the supervisor); the packing, packet size,
// buffer rotation and the status signals are this design's choices.
module mdsi
  import ipf_pkg::*;
#(
  parameter int unsigned DW          = PIX_W,
  parameter int unsigned FRAME_WORDS = IMG_W * IMG_H,
  parameter int unsigned PKT_G       = 8,
  parameter int unsigned FIFO_G      = 32,
  parameter int unsigned NBUF        = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // stream input
  input  logic                     in_valid,
  input  logic [DW-1:0]            in_data,
  // system bus master
  output bus_req_t                 bus_req,
  input  bus_rsp_t                 bus_rsp,
  // supervisor control interface
  input  logic                     cfg_enable,
  input  logic [BUS_AW-1:0]        cfg_base,
  input  logic [BUS_AW-1:0]        cfg_stride,
  output logic                     frame_irq,
  output logic [$clog2(NBUF+1)-1:0] frame_buf,
  output logic                     overflow
);
  localparam int unsigned PER      = (DW <= BUS_DW) ? BUS_DW / DW : 1;
  localparam int unsigned BEATS    = (PER * DW + BUS_DW - 1) / BUS_DW;
  localparam int unsigned GW       = BEATS * BUS_DW;
  localparam int unsigned FRAME_G  = (FRAME_WORDS + PER - 1) / PER;
  localparam int unsigned KW       = $clog2(PER + 1);
  localparam int unsigned BW       = $clog2(BEATS + 1);
  localparam int unsigned FW       = $clog2(FRAME_WORDS + 1);
  localparam int unsigned GCW      = $clog2(FRAME_G + 1);
  localparam int unsigned PCW      = $clog2(PKT_G + 1);
  localparam int unsigned NBW      = $clog2(NBUF + 1);

  // ---------------- packing side ----------------
  logic [GW-1:0] grp;
  logic [KW-1:0] k;
  logic [FW-1:0] words_in;
  logic          push;
  logic [GW-1:0] push_data;

  wire accept     = in_valid && cfg_enable;
  wire last_word  = (words_in == FW'(FRAME_WORDS - 1));
  wire grp_done   = (k == KW'(PER - 1)) || last_word;

  always_comb begin
    push_data = grp;
    push_data[k*DW +: DW] = in_data;
  end
  assign push = accept && grp_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp <= '0; k <= '0; words_in <= '0;
    end else if (accept) begin
      if (grp_done) begin
        grp <= '0;
        k   <= '0;
      end else begin
        grp[k*DW +: DW] <= in_data;
        k <= k + 1'b1;
      end
      words_in <= last_word ? '0 : words_in + 1'b1;
    end
  end

  // ---------------- group FIFO ----------------
  logic          f_full, f_empty, f_pop;
  logic [GW-1:0] f_head;
  logic [$clog2(FIFO_G+1)-1:0] f_count;

  sfifo #(.DW(GW), .DEPTH(FIFO_G)) u_fifo (
    .clk, .rst_n,
    .wr_en(push), .wr_data(push_data),
    .rd_en(f_pop), .rd_data(f_head),
    .full(f_full), .empty(f_empty), .count(f_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= 1'b0;
    else if (push && f_full && !f_pop) overflow <= 1'b1;
  end

  // ---------------- bus side ----------------
  logic [GCW-1:0]    g_left;      // groups of the frame not yet sent
  logic [PCW-1:0]    p_left;      // groups left in the current packet
  logic [BW-1:0]     beat;        // beat within the head group
  logic [BUS_AW-1:0] offs;        // word offset within the frame buffer
  logic [NBW-1:0]    cur_buf;
  logic              in_pkt;

  wire [GCW-1:0] pkt_need = (g_left < GCW'(PKT_G)) ? g_left : GCW'(PKT_G);
  wire           can_start = !in_pkt && (g_left != '0) &&
                             (GCW'(f_count) >= pkt_need);
  wire           beat_ok   = in_pkt && bus_rsp.ready;
  wire           last_beat = (beat == BW'(BEATS - 1));
  wire           last_grp  = (p_left == PCW'(1));

  assign f_pop = beat_ok && last_beat;

  always_comb begin
    bus_req       = '0;
    bus_req.valid = in_pkt;
    bus_req.we    = 1'b1;
    bus_req.lock  = in_pkt && !(last_beat && last_grp);
    bus_req.addr  = cfg_base + BUS_AW'(cur_buf) * cfg_stride + offs;
    bus_req.wdata = f_head[beat*BUS_DW +: BUS_DW];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_left <= GCW'(FRAME_G);
      p_left <= '0; beat <= '0; offs <= '0;
      cur_buf <= '0; in_pkt <= 1'b0;
      frame_irq <= 1'b0; frame_buf <= '0;
    end else begin
      frame_irq <= 1'b0;
      if (can_start) begin
        in_pkt <= 1'b1;
        p_left <= PCW'(pkt_need);
      end
      if (beat_ok) begin
        offs <= offs + 1'b1;
        if (last_beat) begin
          beat   <= '0;
          p_left <= p_left - 1'b1;
          g_left <= g_left - 1'b1;
          if (last_grp) in_pkt <= 1'b0;
          if (g_left == GCW'(1)) begin
            // frame complete in memory
            frame_irq <= 1'b1;
            frame_buf <= cur_buf;
            cur_buf   <= (cur_buf == NBW'(NBUF - 1)) ? '0 : cur_buf + 1'b1;
            offs      <= '0;
            g_left    <= GCW'(FRAME_G);
          end
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

endmodule
