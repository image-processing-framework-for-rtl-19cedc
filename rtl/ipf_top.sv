// ipf_top: the vision system of the framework's example car, three data-flow
// graphs of framework modules sharing one system bus to the external RAM.
//
//  * Gaussian pyramid (pre-filter): the live image of camera 0 is low-pass
//    filtered four times in a chain of separable convolutions; the live image
//    (level L0) and each filter result (L1..L4) go to RAM through a memory
//    data sink each (sinks 0..4).
//  * Stereo: both live images are rectified by a geometric transformation
//    each, made pixel-synchronous by the synchronising source and block
//    matched (SSD, 11x11); the disparity stream goes to RAM (sink 5).
//  * Optical flow: on the supervisor's start the memory data source reads the
//    current frame I and the preceding frame J from RAM as two synchronous
//    streams into the Lucas-Kanade estimator, whose flow, spatial-derivative
//    and covariance streams go to RAM (sinks 6, 7, 8).
// The ten bus masters (sinks 0..8, then the source as master 9) meet in a
// round-robin interconnect whose slave port is the RAM controller port of
// this top. The supervisor (a soft processor) is outside: its control and
// status signals are ports. Sizes follow the cameras of the example (768 x
// 500, 8-bit pixels). Which camera feeds the pyramid, the sink numbering and
// all control signals are choices of this design.
//
// Timing: everything runs on clk; the camera buses are taken as synchronous to
// it. Stream latencies are those of the modules (see each module). The
// matcher's left-right check delays the disparity stream by SSD_DMAX words,
// so in a stored disparity frame pixel p sits at word p + SSD_DMAX.
module ipf_top
  import ipf_pkg::*;
#(
  parameter int unsigned W        = IMG_W,
  parameter int unsigned H        = IMG_H,
  parameter int unsigned SC_LEVELS = 4,
  parameter int unsigned SSD_DMAX = 63,
  parameter int unsigned GIT_D    = 8,
  parameter int unsigned SDSO_DEPTH = 1024,
  localparam int unsigned NSINK   = SC_LEVELS + 1 + 1 + 3,
  localparam int unsigned NM      = NSINK + 1,
  localparam int unsigned MAP_W   = (W + 15) >> 4,
  localparam int unsigned MAP_N   = MAP_W * ((H + 15) >> 4),
  localparam int unsigned MAW     = $clog2(MAP_N)
) (
  input  logic              clk,
  input  logic              rst_n,
  // cameras
  input  logic              cam_fval [2],
  input  logic              cam_lval [2],
  input  logic              cam_pclk_en [2],
  input  pix_t              cam_data [2],
  // RAM controller port
  output bus_req_t          ram_req,
  input  bus_rsp_t          ram_rsp,
  // supervisor: memory data sinks
  input  logic              sink_enable [NSINK],
  input  logic [BUS_AW-1:0] sink_base   [NSINK],
  input  logic [BUS_AW-1:0] sink_stride [NSINK],
  output logic              sink_irq    [NSINK],
  output logic [1:0]        sink_buf    [NSINK],
  output logic              sink_ovf    [NSINK],
  // supervisor: memory data source
  input  logic              src_start,
  input  logic [BUS_AW-1:0] src_base [2],
  input  logic [15:0]       src_gap,
  output logic              src_busy,
  output logic              src_done,
  // supervisor: transformation maps of the two cameras
  input  logic              map_we   [2],
  input  logic [MAW-1:0]    map_addr,
  input  logic [15:0]       map_data,
  // status
  output logic              cam_frame_done [2],
  output logic              cam_fmt_err    [2],
  output logic [31:0]       sync_desync
);
  localparam int unsigned S_STEREO = SC_LEVELS + 1;
  localparam int unsigned S_FLOW   = SC_LEVELS + 2;
  localparam int unsigned S_DER    = SC_LEVELS + 3;
  localparam int unsigned S_COV    = SC_LEVELS + 4;
  localparam int unsigned DISP_W   = $clog2(SSD_DMAX + 1) + 5;
  localparam int unsigned LK_COVW  = 1 + 2 * (18 + 2 * 3) + 3 * (18 + 2 * 3);

  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  logic [$clog2(NM)-1:0] bus_owner;

  // ---------------- live sources ----------------
  logic live_valid [2];
  pix_t live_data  [2];

  for (genvar c = 0; c < 2; c++) begin : g_cam
    ldso #(.W(W), .H(H), .DW(PIX_W)) u_ldso (
      .clk, .rst_n,
      .cam_fval(cam_fval[c]), .cam_lval(cam_lval[c]), .cam_pclk_en(cam_pclk_en[c]),
      .cam_data(cam_data[c]),
      .out_valid(live_valid[c]), .out_data(live_data[c]),
      .frame_done(cam_frame_done[c]), .fmt_err(cam_fmt_err[c])
    );
  end

  // ---------------- Gaussian pyramid ----------------
  logic lvl_valid [SC_LEVELS+1];
  pix_t lvl_data  [SC_LEVELS+1];
  assign lvl_valid[0] = live_valid[0];
  assign lvl_data[0]  = live_data[0];

  for (genvar l = 0; l < SC_LEVELS; l++) begin : g_sc
    sep_conv #(.W(W), .H(H), .DW(PIX_W)) u_sc (
      .clk, .rst_n,
      .in_valid(lvl_valid[l]), .in_data(lvl_data[l]),
      .out_valid(lvl_valid[l+1]), .out_data(lvl_data[l+1])
    );
  end

  for (genvar l = 0; l <= SC_LEVELS; l++) begin : g_lvl_sink
    mdsi #(.DW(PIX_W), .FRAME_WORDS(W * H)) u_mdsi (
      .clk, .rst_n,
      .in_valid(lvl_valid[l]), .in_data(lvl_data[l]),
      .bus_req(m_req[l]), .bus_rsp(m_rsp[l]),
      .cfg_enable(sink_enable[l]), .cfg_base(sink_base[l]), .cfg_stride(sink_stride[l]),
      .frame_irq(sink_irq[l]), .frame_buf(sink_buf[l]), .overflow(sink_ovf[l])
    );
  end

  // ---------------- stereo ----------------
  logic  rect_valid [2];
  pix_t  rect_data  [2];
  logic  sync_valid;
  mpix_t sync_data  [2];
  logic              disp_valid;
  logic [DISP_W-1:0] disp_data;

  for (genvar c = 0; c < 2; c++) begin : g_git
    git_remap #(.W(W), .H(H), .DW(PIX_W), .D(GIT_D)) u_git (
      .clk, .rst_n,
      .in_valid(live_valid[c]), .in_data(live_data[c]),
      .out_valid(rect_valid[c]), .out_data(rect_data[c]),
      .map_we(map_we[c]), .map_addr(map_addr), .map_data(map_data)
    );
  end

  sdso #(.NCH(2), .DEPTH(SDSO_DEPTH)) u_sdso (
    .clk, .rst_n,
    .in_valid(rect_valid), .in_data(rect_data),
    .out_valid(sync_valid), .out_data(sync_data),
    .desync(sync_desync)
  );

  ssd_matcher #(.W(W), .H(H), .DMAX(SSD_DMAX)) u_ssd (
    .clk, .rst_n,
    .in_valid(sync_valid), .in_l(sync_data[0]), .in_r(sync_data[1]),
    .out_valid(disp_valid), .out_data(disp_data)
  );

  mdsi #(.DW(DISP_W), .FRAME_WORDS(W * H)) u_mdsi_disp (
    .clk, .rst_n,
    .in_valid(disp_valid), .in_data(disp_data),
    .bus_req(m_req[S_STEREO]), .bus_rsp(m_rsp[S_STEREO]),
    .cfg_enable(sink_enable[S_STEREO]), .cfg_base(sink_base[S_STEREO]),
    .cfg_stride(sink_stride[S_STEREO]),
    .frame_irq(sink_irq[S_STEREO]), .frame_buf(sink_buf[S_STEREO]),
    .overflow(sink_ovf[S_STEREO])
  );

  // ---------------- optical flow ----------------
  logic               ij_valid;
  pix_t               ij_data [2];
  logic               flow_valid, der_valid, cov_valid;
  logic [32:0]        flow_data;
  logic [18:0]        der_data;
  logic [LK_COVW-1:0] cov_data;

  mdso #(.NCH(2), .DW(PIX_W), .FRAME_WORDS(W * H)) u_mdso (
    .clk, .rst_n,
    .start(src_start), .cfg_base(src_base), .cfg_gap(src_gap),
    .busy(src_busy), .done(src_done),
    .bus_req(m_req[NM-1]), .bus_rsp(m_rsp[NM-1]),
    .out_valid(ij_valid), .out_data(ij_data)
  );

  lk_flow #(.W(W), .H(H)) u_lk (
    .clk, .rst_n,
    .in_valid(ij_valid), .in_i(ij_data[0]), .in_j(ij_data[1]),
    .flow_valid, .flow_data,
    .der_valid, .der_data,
    .cov_valid, .cov_data
  );

  mdsi #(.DW(33), .FRAME_WORDS(W * H)) u_mdsi_flow (
    .clk, .rst_n,
    .in_valid(flow_valid), .in_data(flow_data),
    .bus_req(m_req[S_FLOW]), .bus_rsp(m_rsp[S_FLOW]),
    .cfg_enable(sink_enable[S_FLOW]), .cfg_base(sink_base[S_FLOW]),
    .cfg_stride(sink_stride[S_FLOW]),
    .frame_irq(sink_irq[S_FLOW]), .frame_buf(sink_buf[S_FLOW]),
    .overflow(sink_ovf[S_FLOW])
  );

  mdsi #(.DW(19), .FRAME_WORDS(W * H)) u_mdsi_der (
    .clk, .rst_n,
    .in_valid(der_valid), .in_data(der_data),
    .bus_req(m_req[S_DER]), .bus_rsp(m_rsp[S_DER]),
    .cfg_enable(sink_enable[S_DER]), .cfg_base(sink_base[S_DER]),
    .cfg_stride(sink_stride[S_DER]),
    .frame_irq(sink_irq[S_DER]), .frame_buf(sink_buf[S_DER]),
    .overflow(sink_ovf[S_DER])
  );

  mdsi #(.DW(LK_COVW), .FRAME_WORDS(W * H)) u_mdsi_cov (
    .clk, .rst_n,
    .in_valid(cov_valid), .in_data(cov_data),
    .bus_req(m_req[S_COV]), .bus_rsp(m_rsp[S_COV]),
    .cfg_enable(sink_enable[S_COV]), .cfg_base(sink_base[S_COV]),
    .cfg_stride(sink_stride[S_COV]),
    .frame_irq(sink_irq[S_COV]), .frame_buf(sink_buf[S_COV]),
    .overflow(sink_ovf[S_COV])
  );

  // ---------------- system bus ----------------
  sys_bus #(.NM(NM)) u_bus (
    .clk, .rst_n,
    .m_req, .m_rsp,
    .s_req(ram_req), .s_rsp(ram_rsp),
    .owner(bus_owner)
  );

endmodule
