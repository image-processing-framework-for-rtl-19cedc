// tb_ldso: self-checking testbench of the live data source.
// Drives a camera pixel bus with an 8x4 format (the pixel clock enable is
// high in every cycle, except in the first frame where it is high in every
// second cycle): a regular frame, a frame with
// a short line, a too long line and a missing line, a frame with an extra
// line, and a frame whose blanking is too short to pad a short line in. The
// output stream must always carry W*H words per frame: dropped surplus,
// PAD_VALUE fill, frame_done with each frame's last word, fmt_err only in
// the last case.
module tb_ldso;
  localparam int W = 8, H = 4;
  logic clk = 0, rst_n = 0;
  logic cam_fval = 0, cam_lval = 0, cam_pclk_en = 1;
  logic [7:0] cam_data = 0;
  logic out_valid, frame_done, fmt_err;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int expq [$];
  int words = 0, frames = 0;
  byte unsigned seed = 1;
  bit chk_data = 1;
  bit slow = 0;

  ldso #(.W(W), .H(H), .DW(8), .PAD_VALUE(8'hEE)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      words++;
      if (!chk_data) begin
        // words of the colliding frame are not predicted one by one
      end else if (expq.size() == 0) begin
        failures++; $display("unexpected word %0h", out_data);
      end else begin
        int e;
        e = expq.pop_front();
        checks++;
        if (out_data != 8'(e)) begin
          failures++; $display("word %0d: got %0h exp %0h", words, out_data, e);
        end
      end
      checks++;
      if (frame_done != (words % (W * H) == 0)) begin
        failures++; $display("frame_done wrong at word %0d", words);
      end
    end
    if (rst_n && frame_done) frames++;
  end

  // send one line of n pixels; expect the first W, padded to W
  task automatic line(int n, bit expect_it, int blank);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (slow) begin cam_pclk_en = 0; cam_lval = 1; @(negedge clk); end
      cam_pclk_en = 1;
      cam_lval = 1;
      cam_data = seed;
      if (expect_it && i < W) expq.push_back(int'(seed));
      seed++;
      if (seed == 8'hEE) seed++;
    end
    if (expect_it) for (int i = n; i < W; i++) expq.push_back(32'hEE);
    @(negedge clk);
    cam_lval = 0;
    repeat (blank) @(negedge clk);
  endtask

  task automatic fstart(); @(negedge clk); cam_fval = 1; @(negedge clk); endtask
  task automatic fend(int pad_lines);
    @(negedge clk); cam_fval = 0;
    repeat (pad_lines * W) expq.push_back(32'hEE);
    repeat (3 * W) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // regular frame, pixel clock at half the system clock
    slow = 1;
    fstart(); repeat (H) line(W, 1, 12); fend(0);
    slow = 0;
    // short line, long line, one line missing
    fstart(); line(W, 1, 12); line(5, 1, 12); line(W + 3, 1, 12); fend(1);
    // one line too many
    fstart(); repeat (H) line(W, 1, 12); line(W, 0, 12); fend(0);
    checks++;
    if (fmt_err) begin failures++; $display("fmt_err set too early"); end
    // short line with blanking too short: the next line's first pixels collide
    chk_data = 0;
    fstart(); line(2, 1, 0);
    // the next line arrives while 6 pad words are still going out: its pixels
    // that collide are lost, the line completes with the rest
    for (int i = 0; i < W; i++) begin
      @(negedge clk); cam_lval = 1; cam_data = 8'h11;
    end
    @(negedge clk); cam_lval = 0; cam_fval = 0;
    repeat (6 * W) @(negedge clk);
    checks++;
    if (!fmt_err) begin failures++; $display("fmt_err not set"); end
    checks++;
    if (frames != 4) begin failures++; $display("frames %0d, expected 4", frames); end
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
