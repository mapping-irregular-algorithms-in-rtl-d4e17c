// blob_centroid: centre-of-gravity add-on core of the labeler.
//
// For every blob label (1..254) the core accumulates the pixel count and
// the sums of the column and row coordinates over a labelled frame, one
// pixel per clock, in a read-modify-write table of 256 entries. Two banks
// alternate between the frame being accumulated and the last complete
// frame, with per-label "seen" bits in place of clearing. A read request
// divides the two sums of the requested label by its count with a shared
// restoring divider that produces one quotient bit of each coordinate per
// cycle; the centre is the truncated mean position. Labels 0 and 255 are
// ignored. The framework names this core; its insides are this design's.
//
// Interface: label stream in; `frame_done` pulses after the last pixel of
// a frame. A one-cycle `rd_req` with `rd_label` (while `rd_busy` is low)
// returns `rd_ack` with `rd_found`, `rd_cx`, `rd_cy` DIV_CYCLES+1 cycles
// later (one cycle later for a label absent from the frame), reading the
// last complete frame.
module blob_centroid
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512,
  localparam int unsigned XW   = $clog2(X_MAX),
  localparam int unsigned YW   = $clog2(Y_MAX),
  localparam int unsigned CW   = (XW > YW) ? XW : YW,
  localparam int unsigned AW   = $clog2(X_MAX * Y_MAX + 1),
  localparam int unsigned SW   = AW + CW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  rtip_flags_t   in_flags,
  input  label_t        in_label,
  output logic          frame_done,
  input  logic          rd_req,
  input  label_t        rd_label,
  output logic          rd_busy,
  output logic          rd_ack,
  output logic          rd_found,
  output logic [CW-1:0] rd_cx,
  output logic [CW-1:0] rd_cy
);
  localparam int unsigned DIV_CYCLES = CW;

  typedef struct packed {
    logic [AW-1:0] n;
    logic [SW-1:0] sx, sy;
  } acc_t;

  acc_t          acc [2][256];
  logic [255:0]  seen [2];
  logic          wb_q, wb, done_bank, is_blob, first;
  logic [XW-1:0] x_cnt, cur_x;
  logic [YW-1:0] y_cnt, cur_y;
  acc_t          old_a, new_a;

  // divider state
  logic [SW-1:0]          rem_x, rem_y, dsh;
  logic [$clog2(CW+1)-1:0] step;

  assign wb      = (in_valid && in_flags.sof) ? ~wb_q : wb_q;
  assign is_blob = in_label != '0 && in_label != label_t'(BORDER_LABEL);
  assign cur_x   = in_flags.sof ? '0 : x_cnt;
  assign cur_y   = in_flags.sof ? '0 : y_cnt;
  assign first   = in_flags.sof || !seen[wb][in_label];

  always_comb begin
    old_a = first ? '0 : acc[wb][in_label];
    new_a = '{n: old_a.n + 1'b1, sx: old_a.sx + SW'(cur_x), sy: old_a.sy + SW'(cur_y)};
  end

  always_ff @(posedge clk) begin
    if (in_valid && is_blob) acc[wb][in_label] <= new_a;
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

  // restoring division of both sums by the count, MSB first
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 1'b0; rd_ack <= 1'b0; rd_found <= 1'b0; rd_cx <= '0; rd_cy <= '0;
      rem_x <= '0; rem_y <= '0; dsh <= '0; step <= '0;
    end else begin
      rd_ack <= 1'b0;
      if (!rd_busy) begin
        if (rd_req) begin
          acc_t a;
          a        = acc[done_bank][rd_label];
          rd_found <= seen[done_bank][rd_label];
          rem_x    <= a.sx;
          rem_y    <= a.sy;
          dsh      <= SW'(a.n) << (CW - 1);
          rd_cx    <= '0;
          rd_cy    <= '0;
          step     <= '0;
          rd_busy  <= seen[done_bank][rd_label];
          rd_ack   <= !seen[done_bank][rd_label];
        end
      end else begin
        if (rem_x >= dsh) begin rem_x <= rem_x - dsh; rd_cx <= {rd_cx[CW-2:0], 1'b1}; end
        else                                        rd_cx <= {rd_cx[CW-2:0], 1'b0};
        if (rem_y >= dsh) begin rem_y <= rem_y - dsh; rd_cy <= {rd_cy[CW-2:0], 1'b1}; end
        else                                        rd_cy <= {rd_cy[CW-2:0], 1'b0};
        dsh  <= dsh >> 1;
        step <= step + 1'b1;
        if (step == ($clog2(CW+1))'(DIV_CYCLES - 1)) begin
          rd_busy <= 1'b0;
          rd_ack  <= 1'b1;
        end
      end
    end
  end
endmodule
