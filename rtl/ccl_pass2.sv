// ccl_pass2: second pass of the connected components labeler.
//
// The image of temporary labels is rescanned and every temporary label is
// replaced by the final label of its equivalence class, read from the
// resolver's table. Background (0) stays 0. When `discard_border` is set,
// blobs whose class touches the image border are given the reserved label
// 255 instead, the optional discard offered by the original labeler. The
// option is sampled at the start of each frame (own choice).
//
// Interface: temporary-label stream in, final-label stream out one cycle
// later; a combinational lookup port towards the resolver.
module ccl_pass2
  import rtip_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        discard_border,
  input  logic        in_valid,
  input  rtip_flags_t in_flags,
  input  label_t      in_label,
  // lookup port into the final label table
  output label_t      lk_label,
  input  label_t      lk_final,
  input  logic        lk_border,
  output logic        out_valid,
  output rtip_flags_t out_flags,
  output label_t      out_label
);
  logic discard_q, discard_cur;

  assign lk_label    = in_label;
  assign discard_cur = (in_valid && in_flags.sof) ? discard_border : discard_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      discard_q <= 1'b0; out_valid <= 1'b0; out_flags <= '0; out_label <= '0;
    end else begin
      discard_q <= discard_cur;
      out_valid <= in_valid;
      out_flags <= in_valid ? in_flags : '0;
      if (in_label == '0)                out_label <= '0;
      else if (discard_cur && lk_border) out_label <= label_t'(BORDER_LABEL);
      else                               out_label <= lk_final;
    end
  end
endmodule
