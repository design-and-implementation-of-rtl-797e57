// video_platform_top: reconfigurable image and video processing platform.
//
// One FPGA design that takes interlaced YCbCr 4:2:2 video, turns it into
// progressive frames and shows it on a 640x480 display at a 25 MHz pixel
// clock, with edge recognition and zoom-in / zoom-out selectable at run time
// by push buttons.
//
//   capture (vin_clk): video in -> deinterlacer (field weaving) ->
//            two frame buffers, luminance and chroma, each 320x240 samples on chip
//   display (clk): video_timing -> scaler (1:1 / zoom-in x2 bilinear
//            or nearest / zoom-out 1/2 with low-pass) -> ycbcr2rgb (BT.601 / BT.709 /
//            user matrix) and edge_detector (3x3 gradient, 10 clocks) ->
//            video_mixer (video layer, edge layer, background) -> RGB out
//   control: mode_ctrl (push buttons); the colour matrix, blend factor,
//            threshold and colours are ports, meant to be driven by the
//            embedded processor, which is outside this design, as is the
//            I2C set-up of the video devices.
//
// The functional split (deinterlace unit, frame buffers for luma and chroma,
// RGB conversion unit, mixer, edge recognition, zoom unit, push-button
// control, 25 MHz clock, 10-clock edge pipeline) follows the design
// description, as do the two clocks: capture (deinterlacer, frame buffer
// write ports) runs on `vin_clk`, everything else on the 25 MHz `clk`. The
// frame buffers are the only crossing; there is no frame locking, so a frame
// shown while it is captured can have a seam. This design's own choices are:
// `vin_valid` strobing input pixels, the 320x240 source frame (it fills
// about the 68 block RAMs the description reports as used), the 640x480
// raster and the placement of the image in the top-left corner.
//
// Timing: the display pipeline is 13 clocks long; rgb/de/hsync_n/vsync_n
// are mutually aligned. The edge layer processes the displayed (zoomed)
// luminance, so its picture is one line and one pixel later than the video
// layer; the description does not say how the two were aligned.
module video_platform_top
  import video_pkg::*;
#(
  parameter int unsigned SRC_WIDTH  = SRC_W,
  parameter int unsigned SRC_HEIGHT = SRC_H,
  parameter int unsigned H_ACTIVE   = DISP_W,
  parameter int unsigned H_FP       = 16,
  parameter int unsigned H_SYNC     = 96,
  parameter int unsigned H_BP       = 48,
  parameter int unsigned V_ACTIVE   = DISP_H,
  parameter int unsigned V_FP       = 10,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BP       = 33,
  parameter int unsigned DEBOUNCE   = 250_000
) (
  input  logic        clk,          // 25 MHz display pixel clock
  input  logic        rst_n,        // asynchronous, both clock domains
  // interlaced video input, one pixel per strobe, in the vin_clk domain
  input  logic        vin_clk,
  input  logic        vin_valid,
  input  logic        vin_sof,
  input  logic        vin_sol,
  input  logic        vin_field,
  input  logic [7:0]  vin_y,
  input  logic [7:0]  vin_c,
  output logic        frame_done,   // a full frame was stored (vin_clk domain)
  // push buttons
  input  logic [3:0]  btn,
  // processor-controlled settings
  input  csc_sel_e    csc_sel,
  input  csc_matrix_t csc_user_m,
  input  logic [7:0]  csc_user_yoff,
  input  logic [7:0]  alpha,
  input  logic [7:0]  edge_thresh,
  input  logic        edge_binary,
  input  rgb_t        edge_color,
  input  rgb_t        bg_color,
  // current function selection
  output scale_mode_e cur_mode,
  output logic        cur_bilinear,
  output logic        cur_edge_en,
  output logic        cur_video_en,
  // display output
  output rgb_t        rgb,
  output logic        de,
  output logic        hsync_n,
  output logic        vsync_n
);
  localparam int unsigned RW = $clog2(SRC_HEIGHT);
  localparam int unsigned CW = $clog2(SRC_WIDTH);
  localparam int unsigned SCALER_LAT = 2;
  localparam int unsigned CSC_LAT    = 3;
  localparam int unsigned MIX_LAT    = 1;
  localparam int unsigned PIPE_LAT   = SCALER_LAT + EDGE_LATENCY + MIX_LAT;

  // ---------------- capture ----------------
  logic          wr_en;
  logic [RW-1:0] wr_row;
  logic [CW-1:0] wr_col;
  logic [7:0]    wr_y, wr_c;

  deinterlacer #(.W(SRC_WIDTH), .H(SRC_HEIGHT)) u_deint (
    .clk(vin_clk), .rst_n,
    .vin_valid, .vin_sof, .vin_sol, .vin_field, .vin_y, .vin_c,
    .wr_en, .wr_row, .wr_col, .wr_y, .wr_c, .frame_done
  );

  logic [RW-1:0] y_rrow, c_rrow;
  logic [CW-1:0] y_rcol, c_rcol;
  logic [7:0]    yq00, yq01, yq10, yq11, cq00, cq01, cq10, cq11;

  frame_buffer #(.W(SRC_WIDTH), .H(SRC_HEIGHT), .DW(8)) u_fb_luma (
    .clk, .wclk(vin_clk), .we(wr_en), .wrow(wr_row), .wcol(wr_col), .wdata(wr_y),
    .rrow(y_rrow), .rcol(y_rcol), .q00(yq00), .q01(yq01), .q10(yq10), .q11(yq11)
  );

  frame_buffer #(.W(SRC_WIDTH), .H(SRC_HEIGHT), .DW(8)) u_fb_chroma (
    .clk, .wclk(vin_clk), .we(wr_en), .wrow(wr_row), .wcol(wr_col), .wdata(wr_c),
    .rrow(c_rrow), .rcol(c_rcol), .q00(cq00), .q01(cq01), .q10(cq10), .q11(cq11)
  );

  // ---------------- display timing and control ----------------
  logic [10:0] tx, ty;
  logic        tact, ths_n, tvs_n, tsof;

  video_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_timing (
    .clk, .rst_n, .x(tx), .y(ty), .active(tact),
    .hsync_n(ths_n), .vsync_n(tvs_n), .sof(tsof)
  );

  // Settings change in vertical blanking, on the first blank line once the
  // last pixel of the frame has left the display pipeline.
  logic vblank_start;
  assign vblank_start = (tx == 11'(PIPE_LAT + 1)) && (ty == 11'(V_ACTIVE));

  mode_ctrl #(.DEBOUNCE(DEBOUNCE)) u_mode (
    .clk, .rst_n, .btn, .sof(vblank_start),
    .mode(cur_mode), .bilinear(cur_bilinear),
    .edge_en(cur_edge_en), .video_en(cur_video_en)
  );

  // ---------------- display pipeline ----------------
  ycc_t sc_pix;
  logic sc_in_img, sc_valid;

  scaler #(.W(SRC_WIDTH), .H(SRC_HEIGHT)) u_scaler (
    .clk, .rst_n, .mode(cur_mode), .bilinear(cur_bilinear),
    .x(tx), .y(ty), .active(tact),
    .y_rrow, .y_rcol, .c_rrow, .c_rcol,
    .yq00, .yq01, .yq10, .yq11, .cq00, .cq01, .cq10, .cq11,
    .pix(sc_pix), .in_img(sc_in_img), .valid(sc_valid)
  );

  logic sof2;
  delay_line #(.W(1), .N(SCALER_LAT)) u_dsof (.clk, .rst_n, .d(tsof), .q(sof2));

  logic       ed_valid, ed_flag;
  logic [7:0] ed_mag;

  edge_detector #(.LINE_W(H_ACTIVE), .LATENCY(EDGE_LATENCY)) u_edge (
    .clk, .rst_n, .in_valid(sc_valid), .in_sof(sof2), .in_y(sc_pix.y),
    .thresh(edge_thresh), .out_valid(ed_valid), .out_mag(ed_mag), .out_edge(ed_flag)
  );

  logic csc_valid;
  rgb_t csc_pix;

  ycbcr2rgb u_csc (
    .clk, .rst_n, .sel(csc_sel), .user_m(csc_user_m), .user_yoff(csc_user_yoff),
    .in_valid(sc_valid), .in_pix(sc_pix), .out_valid(csc_valid), .out_pix(csc_pix)
  );

  // Align the video layer with the edge layer.
  logic in_img_csc;
  delay_line #(.W(1), .N(CSC_LAT)) u_dimg (.clk, .rst_n, .d(sc_in_img), .q(in_img_csc));

  rgb_t vid_al;
  logic vid_in_img_al, vid_valid_al;
  delay_line #(.W(26), .N(EDGE_LATENCY - CSC_LAT)) u_dvid (
    .clk, .rst_n, .d({csc_pix, in_img_csc, csc_valid}),
    .q({vid_al, vid_in_img_al, vid_valid_al})
  );

  logic mix_valid;
  rgb_t mix_pix;

  video_mixer u_mix (
    .clk, .rst_n, .video_en(cur_video_en), .edge_en(cur_edge_en),
    .edge_binary, .alpha, .bg(bg_color), .edge_color,
    .in_valid(vid_valid_al), .video(vid_al), .video_in_img(vid_in_img_al),
    .edge_mag(ed_mag), .edge_flag(ed_flag),
    .out_valid(mix_valid), .out_pix(mix_pix)
  );

  // Sync signals follow the pixels through the pipeline.
  logic hs_d, vs_d;
  delay_line #(.W(2), .N(PIPE_LAT)) u_dsync (
    .clk, .rst_n, .d({~ths_n, ~tvs_n}), .q({hs_d, vs_d})
  );

  assign rgb     = mix_pix;
  assign de      = mix_valid;
  assign hsync_n = ~hs_d;
  assign vsync_n = ~vs_d;

  // The edge layer and the video layer run in lock step.
  a_layers_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    ed_valid == vid_valid_al) else $error("edge and video layers out of step");
endmodule
