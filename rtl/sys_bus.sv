// sys_bus: system bus interconnect. Joins NM bus masters (the memory data
// sinks and sources) to the one slave port of the RAM controller.
//
// Arbitration is round robin: when the bus is free, the requesting master
// after the one granted last wins. A master that raises lock with an accepted
// beat keeps the grant for its next beat, so a packet of a memory data sink
// reaches the RAM without other traffic in between. The granted master's
// request goes to the slave unchanged and the slave's ready goes back to it
// alone. Read data return in request order; the interconnect remembers, in a
// FIFO of RQ entries, which master each accepted read belongs to and routes
// rvalid/rdata to it. While that FIFO is full no further read is granted.
// Combinational from request to slave; no added latency.
// The document only names a system bus that joins FPGA, RAM and host link;
// the protocol and this arbiter are this design's.
module sys_bus
  import ipf_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter int unsigned RQ = 16,
  localparam int unsigned MW = (NM <= 1) ? 1 : $clog2(NM)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [NM],
  output bus_rsp_t m_rsp [NM],
  output bus_req_t s_req,
  input  bus_rsp_t s_rsp,
  output logic     [MW-1:0] owner     // master granted in this cycle
);
  logic [MW-1:0] last;
  logic          locked;
  logic          gnt_valid;
  logic          id_full, id_empty;
  logic [MW-1:0] id_head;
  logic [$clog2(RQ+1)-1:0] id_count;

  function automatic logic eligible(input bus_req_t r, input logic full);
    return r.valid && (r.we || !full);
  endfunction

  always_comb begin
    int m;
    m         = 0;
    owner     = last;
    gnt_valid = 1'b0;
    if (locked) begin
      gnt_valid = eligible(m_req[last], id_full);
    end else begin
      for (int i = NM; i >= 1; i--) begin
        m = (int'(last) + i) % NM;
        if (eligible(m_req[m], id_full)) begin
          owner     = MW'(m);
          gnt_valid = 1'b1;
        end
      end
    end
  end

  always_comb begin
    s_req = '0;
    if (gnt_valid) s_req = m_req[owner];
    for (int m = 0; m < NM; m++) begin
      m_rsp[m].ready  = gnt_valid && (owner == MW'(m)) && s_rsp.ready;
      m_rsp[m].rvalid = s_rsp.rvalid && !id_empty && (id_head == MW'(m));
      m_rsp[m].rdata  = s_rsp.rdata;
    end
  end

  wire accepted = gnt_valid && s_rsp.ready;

  sfifo #(.DW(MW), .DEPTH(RQ)) u_ids (
    .clk, .rst_n,
    .wr_en  (accepted && !s_req.we),
    .wr_data(owner),
    .rd_en  (s_rsp.rvalid),
    .rd_data(id_head),
    .full   (id_full),
    .empty  (id_empty),
    .count  (id_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last   <= MW'(NM - 1);
      locked <= 1'b0;
    end else if (accepted) begin
      last   <= owner;
      locked <= s_req.lock;
    end
  end

  // a read response with no read outstanding is a slave error
  assert property (@(posedge clk) disable iff (!rst_n) s_rsp.rvalid |-> !id_empty);

endmodule
