// tb_mdso: self-checking testbench of the memory data source.
// Two 21-word frames of 8-bit words (the last bus word only partly used) are
// placed in a RAM model that stalls at random and answers reads after 4
// cycles. The source is started twice, with no gap and with a gap of 3 idle
// cycles per output set. Every output set must carry word i of both frames,
// the run must end with done after exactly 21 sets, and with a gap of 3 the
// sets must be at least 4 cycles apart.
module tb_mdso;
  import ipf_pkg::*;
  localparam int FW = 21;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, out_valid;
  logic [31:0] base [2];
  logic [15:0] gap = 0;
  bus_req_t req;
  bus_rsp_t rsp;
  logic [7:0] out_data [2];
  int checks = 0, failures = 0;
  int idx = 0, last_cyc = -100, cyc = 0, dones = 0;

  mdso #(.NCH(2), .DW(8), .FRAME_WORDS(FW), .DEPTH(4)) dut (
    .clk, .rst_n, .start, .cfg_base(base), .cfg_gap(gap), .busy, .done,
    .bus_req(req), .bus_rsp(rsp), .out_valid, .out_data);
  ram_model #(.MAW(10), .LAT(4), .STALL_PCT(30)) ram (.clk, .rst_n, .req, .rsp);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [7:0] pat(int c, int i);
    return 8'(c * 100 + i * 7 + 3);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (out_data[c] != pat(c, idx)) begin
          failures++; $display("set %0d ch%0d got %0h exp %0h", idx, c, out_data[c], pat(c, idx));
        end
      end
      checks++;
      if (cyc - last_cyc < int'(gap) + 1) begin
        failures++; $display("sets %0d cycles apart, gap %0d", cyc - last_cyc, gap);
      end
      last_cyc <= cyc;
      idx++;
    end
    if (done) dones++;
  end

  initial begin
    base[0] = 32'h40; base[1] = 32'h80;
    repeat (3) @(posedge clk);
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < FW; i++)
        ram.mem[base[c] + i / 4][8*(i%4) +: 8] = pat(c, i);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      gap = (run == 0) ? 16'd0 : 16'd3;
      idx = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (!busy);
      repeat (3) @(posedge clk);
      checks++;
      if (idx != FW || dones != run + 1) begin
        failures++; $display("run %0d: %0d sets, %0d dones", run, idx, dones);
      end
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
