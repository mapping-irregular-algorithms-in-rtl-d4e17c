// blob_bbox: bounding-box add-on core of the labeler; finds the smallest
// and largest column and row of every blob label in a labelled frame.
//
// Pixel coordinates are counted from the stream flags. For each valid
// pixel with a blob label (1..254) the label's entry of a 256-entry table
// is read, widened to include the pixel and written back, one pixel per
// clock. As in the area core, two banks alternate between the frame being
// accumulated and the last complete frame, and per-label "seen" bits
// replace clearing. Labels 0 and 255 are ignored. The framework names this
// core; its insides are this design's own.
//
// Interface: label stream in; `frame_done` pulses after the last pixel;
// then `rd_label` reads `rd_found` and the box (combinational).
module blob_bbox
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512,
  localparam int unsigned XW   = $clog2(X_MAX),
  localparam int unsigned YW   = $clog2(Y_MAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  rtip_flags_t   in_flags,
  input  label_t        in_label,
  output logic          frame_done,
  input  label_t        rd_label,
  output logic          rd_found,
  output logic [XW-1:0] rd_xmin,
  output logic [XW-1:0] rd_xmax,
  output logic [YW-1:0] rd_ymin,
  output logic [YW-1:0] rd_ymax
);
  typedef struct packed {
    logic [XW-1:0] xmin, xmax;
    logic [YW-1:0] ymin, ymax;
  } box_t;

  box_t          box [2][256];
  logic [255:0]  seen [2];
  logic          wb_q, wb, done_bank, is_blob, first;
  logic [XW-1:0] x_cnt, cur_x;
  logic [YW-1:0] y_cnt, cur_y;
  box_t          old_b, new_b;

  assign wb      = (in_valid && in_flags.sof) ? ~wb_q : wb_q;
  assign is_blob = in_label != '0 && in_label != label_t'(BORDER_LABEL);
  assign cur_x   = in_flags.sof ? '0 : x_cnt;
  assign cur_y   = in_flags.sof ? '0 : y_cnt;
  assign first   = in_flags.sof || !seen[wb][in_label];

  always_comb begin
    old_b = box[wb][in_label];
    if (first) new_b = '{xmin: cur_x, xmax: cur_x, ymin: cur_y, ymax: cur_y};
    else begin
      new_b = old_b;
      if (cur_x < old_b.xmin) new_b.xmin = cur_x;
      if (cur_x > old_b.xmax) new_b.xmax = cur_x;
      if (cur_y < old_b.ymin) new_b.ymin = cur_y;
      if (cur_y > old_b.ymax) new_b.ymax = cur_y;
    end
  end

  always_comb begin
    box_t r;
    r        = box[done_bank][rd_label];
    rd_found = seen[done_bank][rd_label];
    rd_xmin  = r.xmin;
    rd_xmax  = r.xmax;
    rd_ymin  = r.ymin;
    rd_ymax  = r.ymax;
  end

  always_ff @(posedge clk) begin
    if (in_valid && is_blob) box[wb][in_label] <= new_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_q <= 1'b0; done_bank <= 1'b1; frame_done <= 1'b0;
      seen[0] <= '0; seen[1] <= '0; x_cnt <= '0; y_cnt <= '0;
    end else begin
      wb_q       <= wb;
      frame_done <= 1'b0;
      if (in_valid) begin
        x_cnt <= in_flags.eol ? '0 : cur_x + 1'b1;
        y_cnt <= in_flags.eol ? cur_y + 1'b1 : cur_y;
        if (in_flags.sof) seen[wb] <= '0;
        if (is_blob) seen[wb][in_label] <= 1'b1;
        if (in_flags.eof) begin
          done_bank  <= wb;
          frame_done <= 1'b1;
        end
      end
    end
  end
endmodule
