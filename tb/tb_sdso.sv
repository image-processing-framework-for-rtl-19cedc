// tb_sdso: self-checking testbench of the synchronising source (3 streams,
// FIFOs of 8 words). Phase 1 sends the same numbered sequence on the three
// inputs with different delays (up to 9 cycles): every output set must carry
// equal, consecutive, unmarked values. Phase 2 lets stream 0 run 12 words
// ahead of the others, more than its FIFO holds: the forced sets must be
// marked invalid on all streams, carry stream 0's words in order and zeros
// for the empty streams, and be counted in desync. Phase 3 sends the missing
// words on streams 1 and 2, which must pair up with stream 0's buffered
// words again.
module tb_sdso;
  import ipf_pkg::*;
  localparam int NCH = 3, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid [NCH];
  pix_t in_data  [NCH];
  logic out_valid;
  mpix_t out_data [NCH];
  logic [31:0] desync;
  int checks = 0, failures = 0;
  int next_ok = 0, next_forced = 100, forced = 0;

  sdso #(.NCH(NCH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_data[0].invalid) begin
        forced++;
        if (out_data[0].value != 8'(next_forced) || !out_data[1].invalid ||
            !out_data[2].invalid || out_data[1].value != 0 || out_data[2].value != 0) begin
          failures++; $display("bad forced set %p", out_data);
        end
        next_forced++;
      end else begin
        if (out_data[1].invalid || out_data[2].invalid) begin
          failures++; $display("partly marked set %p", out_data);
        end
        for (int c = 0; c < NCH; c++)
          if (out_data[c].value != 8'(next_ok)) begin
            failures++; $display("ch%0d got %0d exp %0d", c, out_data[c].value, next_ok);
          end
        next_ok++;
      end
    end
  end

  // per-channel senders: value sequence starting at first, n words
  task automatic send(int c, int first, int n, int delay, int gapmax);
    repeat (delay) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid[c] = 1; in_data[c] = 8'(first + i);
      @(negedge clk);
      in_valid[c] = 0;
      repeat ($urandom_range(0, gapmax)) @(negedge clk);
    end
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin in_valid[c] = 0; in_data[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1
    fork
      send(0, 0, 60, 0, 0);
      send(1, 0, 60, 3, 0);
      send(2, 0, 60, 9, 0);
    join
    repeat (5) @(posedge clk);
    checks++;
    if (next_ok != 60 || desync != 0) begin
      failures++; $display("phase 1: %0d sets, desync %0d", next_ok, desync);
    end
    // phase 2: stream 0 runs ahead
    next_ok = 100;
    send(0, 100, 12, 0, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (forced == 0 || desync != 32'(forced)) begin
      failures++; $display("phase 2: forced %0d desync %0d", forced, desync);
    end
    // phase 3: the others catch up with what stream 0 still holds
    next_ok = 100 + forced;
    fork
      send(1, 100 + forced, 12 - forced, 0, 1);
      send(2, 100 + forced, 12 - forced, 2, 0);
    join
    repeat (5) @(posedge clk);
    checks++;
    if (next_ok != 112) begin
      failures++; $display("phase 3: next_ok %0d", next_ok);
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
