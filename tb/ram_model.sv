// ram_model: behavioural model of the external RAM and its controller, as
// seen from the system bus. Not synthesizable logic of the design: it stands
// in for a memory chip and a vendor controller in the testbenches.
// A request is accepted when ready is high; ready drops at random in about
// STALL_PCT percent of the cycles. Writes store at once; read data return
// LAT cycles after acceptance, in order. The array holds 2^MAW words; the
// address is taken modulo that size.
module ram_model
  import ipf_pkg::*;
#(
  parameter int unsigned MAW       = 16,
  parameter int unsigned LAT       = 4,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);
  logic [BUS_DW-1:0] mem [1 << MAW];
  logic [BUS_DW-1:0] pipe_d [LAT];
  logic              pipe_v [LAT];
  logic              stall;
  int                writes = 0, reads = 0;

  initial for (int i = 0; i < (1 << MAW); i++) mem[i] = '0;

  always_ff @(posedge clk) stall <= ($urandom_range(0, 99) < STALL_PCT);

  assign rsp.ready  = rst_n && !stall;
  assign rsp.rvalid = pipe_v[LAT-1];
  assign rsp.rdata  = pipe_d[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin pipe_v[i] <= 1'b0; pipe_d[i] <= '0; end
    end else begin
      pipe_v[0] <= req.valid && rsp.ready && !req.we;
      pipe_d[0] <= mem[MAW'(req.addr)];
      for (int i = 1; i < LAT; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      if (req.valid && rsp.ready) begin
        if (req.we) begin
          mem[MAW'(req.addr)] <= req.wdata;
          writes <= writes + 1;
        end else begin
          reads <= reads + 1;
        end
      end
    end
  end
endmodule
