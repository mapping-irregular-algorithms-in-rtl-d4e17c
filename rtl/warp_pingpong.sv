// warp_pingpong: on-the-fly image warper (rotation core of the blob
// analysis chain) built from two warper instances in ping-pong.
//
// An inverse-mapping warper needs the whole source image before it can
// produce the first warped pixel, so two instances alternate: at every
// start of frame the incoming image is written into one instance while
// the other, which holds the previous image, produces the warped version
// of it in step with the incoming pixels. The warped image n therefore
// leaves while image n+1 enters, one pixel out per pixel in. Nothing is
// output while the first image is being stored.
//
// Interface: grey-level stream in, warped stream out, one frame plus
// LATENCY = 2 cycles behind; the affine coefficients are sampled by the
// reading instance at its start of frame.
// The reset also disables the output assertion (`disable iff`), which lint
// reports as a reset used both synchronously and asynchronously; all flops
// use it asynchronously only.
module warp_pingpong
  import rtip_pkg::*;
#(
  parameter int unsigned PW    = 8,
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  affine_t                    coef,
  input  logic [$clog2(X_MAX+1)-1:0] width,
  input  logic [$clog2(Y_MAX+1)-1:0] height,
  input  logic                       in_valid,
  input  rtip_flags_t                in_flags,
  input  logic [PW-1:0]              in_pix,
  output logic                       out_valid,
  output rtip_flags_t                out_flags,
  output logic [PW-1:0]              out_pix
);
  logic        wsel_q, wsel;      // instance being written
  logic [1:0]  full_q;            // instance holds an image
  logic [1:0]  o_valid;
  rtip_flags_t o_flags [2];
  logic [PW-1:0] o_pix [2];
  logic [1:0]  rd_valid;

  assign wsel = (in_valid && in_flags.sof) ? ~wsel_q : wsel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel_q <= 1'b1;             // the first image goes to instance 0
      full_q <= '0;
    end else begin
      wsel_q <= wsel;
      if (in_valid && in_flags.eof) full_q[wsel] <= 1'b1;
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_inst
    // the reader runs only if it holds an image; it follows the incoming scan
    assign rd_valid[i] = in_valid && (wsel != 1'(i)) && full_q[i];
    warp_core #(.PW(PW), .X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_core (
      .clk, .rst_n, .coef, .width, .height,
      .wr_valid(in_valid && (wsel == 1'(i))), .wr_flags(in_flags), .wr_pix(in_pix),
      .rd_valid(rd_valid[i]), .rd_flags(rd_valid[i] ? in_flags : '0),
      .out_valid(o_valid[i]), .out_flags(o_flags[i]), .out_pix(o_pix[i])
    );
  end

  // only one reader is active at a time
  assign out_valid = |o_valid;
  assign out_flags = o_valid[1] ? o_flags[1] : o_flags[0];
  assign out_pix   = o_valid[1] ? o_pix[1]   : o_pix[0];

  assert property (@(posedge clk) disable iff (!rst_n) !(o_valid[0] && o_valid[1]));
endmodule
