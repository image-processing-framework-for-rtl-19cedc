// ldso: live data source. Turns the parallel pixel bus of a camera sensor into
// one framework stream.
//
// The sensor presents a pixel on cam_data in every cycle in which cam_fval
// (frame valid), cam_lval (line valid) and cam_pclk_en are all high. The
// sensor runs in the system clock domain, its slower pixel clock given as a
// clock enable (cam_pclk_en), e.g. every fourth cycle. A stream carries
// no frame or line markers, so downstream modules rely on every frame having
// exactly W x H words in raster order. This module guarantees that: pixels past
// column W-1 of a line and lines past row H-1 are dropped, a line that ends
// short is filled with PAD_VALUE words, one per cycle, in the blanking that
// follows, and a frame that ends short is filled up with whole pad lines. A
// sensor pixel that arrives while padding is going on is dropped and sets the
// sticky fmt_err flag (the sensor's blanking was too short to pad in).
//
// Timing: out_valid/out_data follow the sensor by one register stage.
// frame_done pulses together with the last word of each frame.
// The document gives this block's function (it delivers the pixel stream of a
// camera sensor); the sensor interface, the format guard and the padding are
// choices of this design.
module ldso #(
  parameter int unsigned   W         = ipf_pkg::IMG_W,
  parameter int unsigned   H         = ipf_pkg::IMG_H,
  parameter int unsigned   DW        = ipf_pkg::PIX_W,
  parameter logic [DW-1:0] PAD_VALUE = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  // camera pixel bus
  input  logic          cam_fval,
  input  logic          cam_lval,
  input  logic          cam_pclk_en,
  input  logic [DW-1:0] cam_data,
  // output stream
  output logic          out_valid,
  output logic [DW-1:0] out_data,
  // status
  output logic          frame_done,
  output logic          fmt_err
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);

  typedef enum logic [1:0] {PAD_NONE, PAD_LINE, PAD_FRAME} pad_e;

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          fval_q, lval_q;
  logic          in_frame;
  logic          line_full;
  pad_e          pad;

  wire pix_in    = cam_fval && cam_lval && cam_pclk_en;
  wire line_end  = lval_q && !cam_lval;
  wire frame_end = fval_q && !cam_fval;
  wire last_x    = (x == XW'(W - 1));
  wire last_y    = (y == YW'(H - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0;
      fval_q <= 1'b0; lval_q <= 1'b0;
      in_frame <= 1'b0; line_full <= 1'b0;
      pad <= PAD_NONE;
      out_valid <= 1'b0; out_data <= '0;
      frame_done <= 1'b0; fmt_err <= 1'b0;
    end else begin
      fval_q     <= cam_fval;
      lval_q     <= cam_lval;
      out_valid  <= 1'b0;
      frame_done <= 1'b0;

      if (pad != PAD_NONE) begin
        out_valid <= 1'b1;
        out_data  <= PAD_VALUE;
        if (pix_in) fmt_err <= 1'b1;
        if (frame_end) pad <= PAD_FRAME;
        if (last_x) begin
          x <= '0;
          if (pad == PAD_LINE && !frame_end) pad <= PAD_NONE;
          if (last_y) begin
            y <= '0;
            pad <= PAD_NONE;
            in_frame <= 1'b0;
            frame_done <= 1'b1;
          end else begin
            y <= y + 1'b1;
          end
        end else begin
          x <= x + 1'b1;
        end
      end else begin
        if (cam_fval && !fval_q) begin
          in_frame  <= 1'b1;
          line_full <= 1'b0;
          x <= '0; y <= '0;
        end else if (in_frame) begin
          if (pix_in && !line_full) begin
            out_valid <= 1'b1;
            out_data  <= cam_data;
            if (last_x) begin
              x <= '0;
              line_full <= 1'b1;
              if (last_y) begin
                y <= '0;
                in_frame <= 1'b0;
                frame_done <= 1'b1;
              end else begin
                y <= y + 1'b1;
              end
            end else begin
              x <= x + 1'b1;
            end
          end
          if (line_end) begin
            line_full <= 1'b0;
            if (x != '0) pad <= PAD_LINE;
          end
          if (frame_end) pad <= PAD_FRAME;
        end
      end
    end
  end

endmodule
