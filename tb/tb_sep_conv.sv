// tb_sep_conv: self-checking testbench of the separable convolution.
// Streams three random 16x10 frames with random idle cycles through a 5-tap
// binomial filter and compares every output word with a reference computed
// here from the frame (edge replication to the top and left, output centred
// half a kernel behind the input, rounding after each pass). Also checks
// that each output leaves exactly two cycles after its input.
module tb_sep_conv;
  localparam int W = 16, H = 10, K = 5, FRAMES = 3;
  localparam int C [K] = '{1, 4, 6, 4, 1};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_data = 0;
  logic out_valid;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  sep_conv #(.W(W), .H(H), .DW(8), .K(K)) dut (.*);

  always #5 clk = ~clk;

  int img [H][W];
  int expq [$];
  int vq [$];      // cycle of each input

  function automatic int vert(int x, int y);
    int s = 0;
    for (int j = 0; j < K; j++) s += C[j] * img[(y - j < 0) ? 0 : y - j][x];
    s = (s + 8) >> 4;
    return s > 255 ? 255 : s;
  endfunction

  function automatic int ref_out(int x, int y);
    int s = 0;
    for (int i = 0; i < K; i++) s += C[i] * vert((x - i < 0) ? 0 : x - i, y);
    s = (s + 8) >> 4;
    return s > 255 ? 255 : s;
  endfunction

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e, c0;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = expq.pop_front();
        c0 = vq.pop_front();
        if (out_data !== 8'(e)) begin
          failures++;
          if (failures < 10) $display("mismatch: got %0d exp %0d", out_data, e);
        end
        checks++;
        if (cycle - c0 != 2) begin
          failures++;
          if (failures < 10) $display("latency %0d, expected 2", cycle - c0);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[y][x] = (f == 2) ? ((x + y) % 2) * 255 : $urandom_range(0, 255);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1;
          in_data  = 8'(img[y][x]);
          expq.push_back(ref_out(x, y));
          vq.push_back(cycle);
          @(negedge clk);
          in_valid = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d outputs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
