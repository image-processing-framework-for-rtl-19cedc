// tb_file_verification: the module verification flow with the file data
// source and sink. A comma separated stimulus file (a 16x10 image) is read
// by the file data source and streamed through a separable convolution, the
// module under test; the file data sink writes its output stream into a
// result file. A reference implementation here reads the same stimulus file
// on its own, filters the image and writes a second result file. The two
// result files are then read back and compared line by line. The stream the
// file source delivers is also compared with the values the reference read.
module tb_file_verification;
  localparam int W = 16, H = 10, K = 5;
  localparam int C [K] = '{1, 4, 6, 4, 1};
  logic clk = 0, rst_n = 0;
  logic s_valid, s_done, r_valid, close = 0;
  logic [7:0] s_data, r_data;
  int hw_count;
  int checks = 0, failures = 0;

  fdso #(.FILE("tb/fdso_stimuli.dat"), .DW(8), .GAP(1)) u_src (
    .clk, .rst_n, .out_valid(s_valid), .out_data(s_data), .done(s_done));
  sep_conv #(.W(W), .H(H), .DW(8), .K(K)) u_mut (
    .clk, .rst_n, .in_valid(s_valid), .in_data(s_data), .out_valid(r_valid), .out_data(r_data));
  fdsi #(.FILE("tb/sc_hw_result.dat"), .DW(8), .PER_LINE(W)) u_sink (
    .clk, .rst_n, .in_valid(r_valid), .in_data(r_data), .close, .count(hw_count));

  always #5 clk = ~clk;

  int img [H][W];
  int n_in = 0;

  // stream from the file source against the independently read stimulus
  always @(posedge clk) if (rst_n && s_valid) begin
    checks++;
    if (n_in >= W * H || s_data != 8'(img[n_in / W][n_in % W])) begin
      failures++; $display("source word %0d wrong", n_in);
    end
    n_in++;
  end

  function automatic int vert(int x, int y);
    int s = 0;
    s = 0;
    for (int j = 0; j < K; j++) s += C[j] * img[(y - j < 0) ? 0 : y - j][x];
    s = (s + 8) >> 4;
    return s > 255 ? 255 : s;
  endfunction

  initial begin
    int fd, fr, fh, v;
    string lr, lh;
    // reference implementation: read stimuli, filter, write its result file
    fd = $fopen("tb/fdso_stimuli.dat", "r");
    for (int i = 0; i < W * H; i++) begin
      void'($fscanf(fd, "%d", v));
      img[i / W][i % W] = v;
      void'($fgetc(fd));               // separator
    end
    $fclose(fd);
    fr = $fopen("tb/sc_ref_result.dat", "w");
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        int s;
        s = 0;
        for (int i = 0; i < K; i++) s += C[i] * vert((x - i < 0) ? 0 : x - i, y);
        s = (s + 8) >> 4;
        if (x != 0) $fwrite(fr, ",");
        $fwrite(fr, "%0d", s > 255 ? 255 : s);
      end
      $fwrite(fr, "\n");
    end
    $fclose(fr);
    // hardware run
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (s_done);
    repeat (10) @(posedge clk);
    close = 1;
    @(posedge clk);
    close = 0;
    @(posedge clk);
    checks++;
    if (hw_count != W * H) begin failures++; $display("sink wrote %0d words", hw_count); end
    // compare the result files
    fr = $fopen("tb/sc_ref_result.dat", "r");
    fh = $fopen("tb/sc_hw_result.dat", "r");
    for (int y = 0; y < H; y++) begin
      void'($fgets(lr, fr));
      void'($fgets(lh, fh));
      checks++;
      if (lr.compare(lh) != 0) begin failures++; $display("line %0d differs:\n  ref %s  hw  %s", y, lr, lh); end
    end
    $fclose(fr);
    $fclose(fh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
