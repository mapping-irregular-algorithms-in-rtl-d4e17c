// blob_area: area add-on core of the labeler; counts the pixels of every
// blob label in a labelled frame.
//
// Each valid pixel with a blob label (1..254) increments that label's
// counter by a read-modify-write of a 256-entry table, one pixel per clock.
// Two banks alternate from frame to frame: one accumulates the frame
// streaming in while the other holds the results of the last complete
// frame for reading. A per-bank "seen" bit per label replaces clearing the
// table, so a new frame starts without dead cycles. Background (0) and
// discarded border blobs (255) are not counted. The core is named by the
// framework; its insides are this design's own.
//
// Interface: label stream in; `frame_done` pulses one cycle after the last
// pixel of a frame, from then on until the end of the next frame
// `rd_label` -> `rd_area` reads the result (combinational, 0 for absent
// labels).
module blob_area
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512,
  localparam int unsigned AW   = $clog2(X_MAX * Y_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  rtip_flags_t   in_flags,
  input  label_t        in_label,
  output logic          frame_done,
  input  label_t        rd_label,
  output logic [AW-1:0] rd_area
);
  logic [AW-1:0] area [2][256];
  logic [255:0]  seen [2];
  logic          wb_q, wb, done_bank;
  logic          is_blob;

  assign wb      = (in_valid && in_flags.sof) ? ~wb_q : wb_q;
  assign is_blob = in_label != '0 && in_label != label_t'(BORDER_LABEL);
  assign rd_area = seen[done_bank][rd_label] ? area[done_bank][rd_label] : '0;

  always_ff @(posedge clk) begin
    if (in_valid && is_blob)
      area[wb][in_label] <= (seen[wb][in_label] && !in_flags.sof) ? area[wb][in_label] + 1'b1
                                                                  : AW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_q <= 1'b0; done_bank <= 1'b1; frame_done <= 1'b0;
      seen[0] <= '0; seen[1] <= '0;
    end else begin
      wb_q       <= wb;
      frame_done <= 1'b0;
      if (in_valid) begin
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
