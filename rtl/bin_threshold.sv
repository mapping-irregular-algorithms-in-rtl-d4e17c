// bin_threshold: binarisation operator of the blob analysis chain.
//
// A grey-level pixel becomes foreground (1) when it is at least the
// threshold and background (0) otherwise. The threshold is a run-time
// parameter set through the configuration controller; it is sampled at the
// first pixel of each frame so that a frame is never split between two
// thresholds (this design's choice; the framework only shows a threshold
// input). One cycle of latency, one pixel per clock, flags passed along.
module bin_threshold
  import rtip_pkg::*;
#(
  parameter int unsigned PW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] threshold,
  input  logic          in_valid,
  input  rtip_flags_t   in_flags,
  input  logic [PW-1:0] in_pix,
  output logic          out_valid,
  output rtip_flags_t   out_flags,
  output logic          out_bin
);
  logic [PW-1:0] thr_q, thr;

  assign thr = (in_valid && in_flags.sof) ? threshold : thr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr_q <= '0; out_valid <= 1'b0; out_flags <= '0; out_bin <= 1'b0;
    end else begin
      thr_q     <= thr;
      out_valid <= in_valid;
      out_flags <= in_valid ? in_flags : '0;
      out_bin   <= in_valid && (in_pix >= thr);
    end
  end
endmodule
