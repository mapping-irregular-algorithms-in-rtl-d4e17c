// blob_frontend: blob analysis front end built by cascading framework
// operators: rotation -> binarisation -> connected components labeling ->
// centroid, area and bounding box.
//
// A grey-level image stream is rotated about the image centre by an
// inverse-mapping warper (two instances in ping-pong, nearest-neighbour),
// thresholded to a binary image, and labelled on the fly by two connected
// components labelers in ping-pong. The labelled stream feeds three
// add-on cores that measure every blob. All run-time parameters (frame
// size, angle, threshold, border-blob discard) are written through one
// configuration FIFO and controller; the rotation angle is turned into
// affine coefficients by a CORDIC unit.
//
// Timing: one pixel per clock at most, no back-pressure. The rotated image
// n leaves the warper while image n+1 enters; the labels of image n leave
// the labeler while the binarised image n+2 enters it, so the labelled
// image n is output while input image n+3 streams in, 6 cycles behind it
// (2 warper + 1 binarisation + 3 labeler). Measurements of a labelled
// image can be read from its last pixel until the end of the next one.
// Frames must be at least X*Y >= the equivalence resolution time apart
// per labeler, otherwise `overrun` pulses. The order of the chain and the
// three add-on cores follow the framework's example; the stream format,
// configuration encoding and all widths are this design's own.
// A few status outputs of the sub-blocks (configuration write strobe,
// coefficient valid, resolution cycle counts, the box and centroid
// frame_done pulses) are left unconnected here: stats_done already marks
// when all three measurement cores have swapped banks.
// Lint reports the reset as used both synchronously and asynchronously
// because the ping-pong wrappers' assertions are disabled by it; all
// flops use it asynchronously only.
module blob_frontend
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX   = 512,
  parameter int unsigned Y_MAX   = 512,
  parameter int unsigned N_PAIRS = 512,
  parameter int unsigned PW      = 8,
  localparam int unsigned XW     = $clog2(X_MAX),
  localparam int unsigned YW     = $clog2(Y_MAX),
  localparam int unsigned CW     = (XW > YW) ? XW : YW,
  localparam int unsigned AW     = $clog2(X_MAX * Y_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration FIFO
  input  logic          cfg_push,
  input  cfg_word_t     cfg_word,
  output logic          cfg_full,
  output logic          cfg_err,
  // grey-level image stream
  input  logic          in_valid,
  input  rtip_flags_t   in_flags,
  input  logic [PW-1:0] in_pix,
  // labelled image stream
  output logic          out_valid,
  output rtip_flags_t   out_flags,
  output label_t        out_label,
  // measurements of the last labelled image
  output logic          stats_done,
  input  label_t        area_label,
  output logic [AW-1:0] area,
  input  label_t        bbox_label,
  output logic          bbox_found,
  output logic [XW-1:0] bbox_xmin,
  output logic [XW-1:0] bbox_xmax,
  output logic [YW-1:0] bbox_ymin,
  output logic [YW-1:0] bbox_ymax,
  input  logic          cog_req,
  input  label_t        cog_label,
  output logic          cog_busy,
  output logic          cog_ack,
  output logic          cog_found,
  output logic [CW-1:0] cog_x,
  output logic [CW-1:0] cog_y,
  // status
  output logic [1:0]    res_busy,     // equivalence resolution running: [0] odd, [1] even labeler
  output logic [1:0]    res_done,
  output logic          overrun,
  output logic          label_ovf,
  output logic          pair_ovf
);
  localparam int WW = $clog2(X_MAX + 1);
  localparam int HW = $clog2(Y_MAX + 1);

  logic          f_empty, f_pop;
  cfg_word_t     f_data;
  rtip_cfg_t     cfg;
  logic          cfg_wr;
  logic [WW-1:0] width;
  logic [HW-1:0] height;
  affine_t       coef;
  logic          coef_valid;

  logic          r_valid, b_valid;
  rtip_flags_t   r_flags, b_flags;
  logic [PW-1:0] r_pix;
  logic          b_bin;
  logic [31:0]   res_cycles_odd, res_cycles_even;
  logic          bbox_done, cog_done;

  rtip_sync_fifo #(.W(32), .DEPTH(16)) u_cfg_fifo (
    .clk, .rst_n, .wr_en(cfg_push), .wr_data(cfg_word), .full(cfg_full),
    .rd_en(f_pop), .rd_data(f_data), .empty(f_empty)
  );

  rtip_config_ctrl #(.X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_cfg (
    .clk, .rst_n, .fifo_empty(f_empty), .fifo_data(f_data), .fifo_pop(f_pop),
    .cfg, .cfg_wr, .cfg_err
  );

  assign width  = WW'(cfg.width);
  assign height = HW'(cfg.height);

  rot_coef #(.X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_rot_coef (
    .clk, .rst_n, .angle(cfg.angle), .width, .height, .coef, .coef_valid
  );

  warp_pingpong #(.PW(PW), .X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_rotate (
    .clk, .rst_n, .coef, .width, .height,
    .in_valid, .in_flags, .in_pix,
    .out_valid(r_valid), .out_flags(r_flags), .out_pix(r_pix)
  );

  bin_threshold #(.PW(PW)) u_bin (
    .clk, .rst_n, .threshold(cfg.threshold[PW-1:0]),
    .in_valid(r_valid), .in_flags(r_flags), .in_pix(r_pix),
    .out_valid(b_valid), .out_flags(b_flags), .out_bin(b_bin)
  );

  ccl_pingpong #(.X_MAX(X_MAX), .Y_MAX(Y_MAX), .N_PAIRS(N_PAIRS)) u_ccl (
    .clk, .rst_n, .height, .discard_border(cfg.discard),
    .in_valid(b_valid), .in_flags(b_flags), .in_pix(b_bin),
    .out_valid, .out_flags, .out_label,
    .res_done, .res_busy, .res_cycles_odd, .res_cycles_even,
    .overrun, .label_ovf, .pair_ovf
  );

  blob_centroid #(.X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_centroid (
    .clk, .rst_n, .in_valid(out_valid), .in_flags(out_flags), .in_label(out_label),
    .frame_done(cog_done), .rd_req(cog_req), .rd_label(cog_label),
    .rd_busy(cog_busy), .rd_ack(cog_ack), .rd_found(cog_found), .rd_cx(cog_x), .rd_cy(cog_y)
  );

  blob_area #(.X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_area (
    .clk, .rst_n, .in_valid(out_valid), .in_flags(out_flags), .in_label(out_label),
    .frame_done(stats_done), .rd_label(area_label), .rd_area(area)
  );

  blob_bbox #(.X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_bbox (
    .clk, .rst_n, .in_valid(out_valid), .in_flags(out_flags), .in_label(out_label),
    .frame_done(bbox_done), .rd_label(bbox_label), .rd_found(bbox_found),
    .rd_xmin(bbox_xmin), .rd_xmax(bbox_xmax), .rd_ymin(bbox_ymin), .rd_ymax(bbox_ymax)
  );
endmodule
