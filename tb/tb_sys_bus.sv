// tb_sys_bus: self-checking testbench of the system bus interconnect with
// three masters and a RAM model that stalls at random. Master 0 writes
// locked packets of four beats, master 1 reads words placed in the RAM
// beforehand, master 2 writes single beats; all three are busy at once.
// Checks: a locked packet reaches the RAM with no other master's beat in
// between; every read returns the right word to master 1 only, in order;
// every write lands in the RAM; every master is served (round robin).
module tb_sys_bus;
  import ipf_pkg::*;
  localparam int NM = 3;
  logic clk = 0, rst_n = 0;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  bus_req_t s_req;
  bus_rsp_t s_rsp;
  logic [1:0] owner;
  int checks = 0, failures = 0;
  int served [NM];

  sys_bus #(.NM(NM), .RQ(4)) dut (.*);
  ram_model #(.MAW(10), .LAT(3), .STALL_PCT(25)) ram (.clk, .rst_n, .req(s_req), .rsp(s_rsp));

  always #5 clk = ~clk;

  // packet integrity seen at the slave
  logic in_pkt = 0;
  logic [1:0] pkt_owner;
  always @(posedge clk) if (rst_n && s_req.valid && s_rsp.ready) begin
    served[owner]++;
    if (in_pkt) begin
      checks++;
      if (owner != pkt_owner) begin failures++; $display("packet interrupted by master %0d", owner); end
    end
    in_pkt <= s_req.lock;
    pkt_owner <= owner;
  end

  // other masters must never see read data
  always @(posedge clk) if (rst_n) begin
    if (m_rsp[0].rvalid || m_rsp[2].rvalid) begin
      failures++; $display("read data routed to a writer");
    end
  end

  task automatic beat(int m, logic we, logic lock, logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    m_req[m].valid = 1; m_req[m].we = we; m_req[m].lock = lock;
    m_req[m].addr = a; m_req[m].wdata = d;
    @(posedge clk);
    while (!m_rsp[m].ready) @(posedge clk);
    @(negedge clk);
    m_req[m] = '0;
  endtask

  int rd_next = 0, rd_issued = 0;
  always @(posedge clk) if (rst_n && m_rsp[1].rvalid) begin
    checks++;
    if (m_rsp[1].rdata != 32'(32'hA000 + rd_next)) begin
      failures++; $display("read %0d got %0h", rd_next, m_rsp[1].rdata);
    end
    rd_next++;
  end

  initial begin
    for (int m = 0; m < NM; m++) begin m_req[m] = '0; served[m] = 0; end
    repeat (3) @(posedge clk);
    for (int i = 0; i < 64; i++) ram.mem[10'(512 + i)] = 32'hA000 + i;
    rst_n = 1;
    fork
      for (int p = 0; p < 8; p++)
        for (int b = 0; b < 4; b++) beat(0, 1, b != 3, 32'(p * 4 + b), 32'hB000 + p * 4 + b);
      for (int i = 0; i < 40; i++) beat(1, 0, 0, 32'(512 + i), 0);
      for (int i = 0; i < 20; i++) beat(2, 1, 0, 32'(256 + i), 32'hC000 + i);
    join
    repeat (20) @(posedge clk);
    checks++;
    if (rd_next != 40) begin failures++; $display("%0d reads returned", rd_next); end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (ram.mem[i] != 32'hB000 + i) begin failures++; $display("packet word %0d lost", i); end
    end
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (ram.mem[256 + i] != 32'hC000 + i) begin failures++; $display("single write %0d lost", i); end
    end
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (served[m] == 0) begin failures++; $display("master %0d starved", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
