// tb_mdsi: self-checking testbench of the memory data sink.
// Sink A packs 8-bit words four to a bus word (37-word frames, so the last
// group is partial; packets of 4 groups). Sink B takes 40-bit words, two bus
// beats each (10-word frames, packets of 3 groups). Each writes three frames
// into a RAM model that stalls at random. After every frame_irq the frame
// buffer named by frame_buf (alternating 0, 1, 0) must hold the frame exactly.
// Packets must be written to consecutive addresses with lock held until the
// last beat. Finally sink B is fed faster than the bus can take (two beats
// per word at one word per cycle) and must flag overflow; sink A never does.
module tb_mdsi;
  import ipf_pkg::*;
  localparam int FA = 37, FB = 10;
  localparam logic [31:0] BASE_A = 32'h100, BASE_B = 32'h800, STRIDE = 32'h40;

  logic clk = 0, rst_n = 0;
  logic va = 0, vb = 0;
  logic [7:0]  da = 0;
  logic [39:0] db = 0;
  bus_req_t ra, rb;
  bus_rsp_t sa, sb;
  logic irq_a, irq_b, ovf_a, ovf_b, en = 0;
  logic [1:0] buf_a, buf_b;
  int checks = 0, failures = 0;

  mdsi #(.DW(8), .FRAME_WORDS(FA), .PKT_G(4), .FIFO_G(8)) dut_a (
    .clk, .rst_n, .in_valid(va), .in_data(da), .bus_req(ra), .bus_rsp(sa),
    .cfg_enable(en), .cfg_base(BASE_A), .cfg_stride(STRIDE),
    .frame_irq(irq_a), .frame_buf(buf_a), .overflow(ovf_a));
  mdsi #(.DW(40), .FRAME_WORDS(FB), .PKT_G(3), .FIFO_G(4)) dut_b (
    .clk, .rst_n, .in_valid(vb), .in_data(db), .bus_req(rb), .bus_rsp(sb),
    .cfg_enable(en), .cfg_base(BASE_B), .cfg_stride(STRIDE),
    .frame_irq(irq_b), .frame_buf(buf_b), .overflow(ovf_b));
  ram_model #(.MAW(12), .STALL_PCT(30)) ram_a (.clk, .rst_n, .req(ra), .rsp(sa));
  ram_model #(.MAW(12), .STALL_PCT(30)) ram_b (.clk, .rst_n, .req(rb), .rsp(sb));

  always #5 clk = ~clk;

  logic [7:0]  fa_q [$][FA];
  logic [39:0] fb_q [$][FB];
  int irqs_a = 0, irqs_b = 0;

  // packet rules: consecutive addresses while locked
  logic        la_prev = 0, lb_prev = 0;
  logic [31:0] aa_prev, ab_prev;
  always @(posedge clk) if (rst_n) begin
    if (ra.valid && sa.ready) begin
      if (la_prev) begin
        checks++;
        if (ra.addr != aa_prev + 1) begin failures++; $display("A: packet not contiguous"); end
      end
      la_prev <= ra.lock; aa_prev <= ra.addr;
    end
    if (rb.valid && sb.ready) begin
      if (lb_prev) begin
        checks++;
        if (rb.addr != ab_prev + 1) begin failures++; $display("B: packet not contiguous"); end
      end
      lb_prev <= rb.lock; ab_prev <= rb.addr;
    end
  end

  // frame checks
  always @(posedge clk) if (rst_n) begin
    if (irq_a) begin
      logic [31:0] w;
      checks++;
      if (buf_a != 2'(irqs_a % 2)) begin failures++; $display("A: buffer %0d", buf_a); end
      for (int i = 0; i < FA; i++) begin
        w = ram_a.mem[BASE_A + STRIDE * buf_a + i / 4];
        checks++;
        if (w[8*(i%4) +: 8] != fa_q[0][i]) begin
          failures++; $display("A: frame %0d word %0d got %0h exp %0h", irqs_a, i, w[8*(i%4) +: 8], fa_q[0][i]);
        end
      end
      void'(fa_q.pop_front());
      irqs_a++;
    end
    if (irq_b) begin
      logic [63:0] w;
      checks++;
      if (buf_b != 2'(irqs_b % 2)) begin failures++; $display("B: buffer %0d", buf_b); end
      for (int i = 0; i < FB; i++) begin
        w = {ram_b.mem[BASE_B + STRIDE * buf_b + 2*i + 1], ram_b.mem[BASE_B + STRIDE * buf_b + 2*i]};
        checks++;
        if (w[39:0] != fb_q[0][i]) begin
          failures++; $display("B: frame %0d word %0d", irqs_b, i);
        end
      end
      void'(fb_q.pop_front());
      irqs_b++;
    end
  end

  task automatic frame_a(int gap);
    logic [7:0] f [FA];
    for (int i = 0; i < FA; i++) f[i] = 8'($urandom);
    fa_q.push_back(f);
    for (int i = 0; i < FA; i++) begin
      @(negedge clk); va = 1; da = f[i];
      @(negedge clk); va = 0;
      repeat ($urandom_range(0, gap)) @(negedge clk);
    end
  endtask

  task automatic frame_b(int gap);
    logic [39:0] f [FB];
    for (int i = 0; i < FB; i++) f[i] = {8'($urandom), 32'($urandom)};
    fb_q.push_back(f);
    for (int i = 0; i < FB; i++) begin
      @(negedge clk); vb = 1; db = f[i];
      if (gap > 0) begin
        @(negedge clk); vb = 0;
        repeat ($urandom_range(0, gap)) @(negedge clk);
      end
    end
    @(negedge clk); vb = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; en = 1;
    fork
      repeat (3) frame_a(3);
      repeat (3) frame_b(6);
    join
    repeat (100) @(posedge clk);
    checks++;
    if (irqs_a != 3 || irqs_b != 3) begin failures++; $display("irqs %0d %0d", irqs_a, irqs_b); end
    checks++;
    if (ovf_a || ovf_b) begin failures++; $display("unexpected overflow"); end
    // overload sink B
    fb_q.delete();
    frame_b(0); frame_b(0);
    repeat (100) @(posedge clk);
    checks++;
    if (!ovf_b) begin failures++; $display("overflow not flagged"); end
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
