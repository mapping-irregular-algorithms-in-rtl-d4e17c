// warp_affine: affine transformation unit of the inverse-mapping warper.
//
// For every pixel (x, y) of the warped image, produced in scanline order,
// it computes the source position u = ux*x + uy*y + u0, v = vx*x + vy*y + v0
// (the inverse mapping of an affine transformation) and rounds it to the
// nearest pixel (nearest-neighbour interpolation). No multiplier is used
// per pixel: u and v are accumulated, adding (ux, vx) along a line and
// (uy, vy) from one line start to the next, in fixed point with FRAC
// fraction bits. The coefficients are sampled at the start of each frame.
// A position outside the width x height source image is flagged so that
// the warper can output background.
//
// Interface: the output scan arrives as a stream of valid/flags (one per
// output pixel, in any cadence); one cycle later the rounded (u, v), the
// `inside` flag and the flags come out.
module warp_affine
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512,
  localparam int unsigned XW   = $clog2(X_MAX),
  localparam int unsigned YW   = $clog2(Y_MAX)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  affine_t                   coef,
  input  logic [$clog2(X_MAX+1)-1:0] width,
  input  logic [$clog2(Y_MAX+1)-1:0] height,
  input  logic                      in_valid,
  input  rtip_flags_t               in_flags,
  output logic                      out_valid,
  output rtip_flags_t               out_flags,
  output logic [XW-1:0]             out_u,
  output logic [YW-1:0]             out_v,
  output logic                      out_inside
);
  affine_t coef_q, c;
  fix_t    u_q, v_q, urow_q, vrow_q;     // position of the next pixel / next line start
  fix_t    u, v, urow, vrow, ur, vr;

  always_comb begin
    c    = (in_valid && in_flags.sof) ? coef : coef_q;
    urow = in_flags.sof ? c.u0 : urow_q;
    vrow = in_flags.sof ? c.v0 : vrow_q;
    u    = in_flags.sof ? c.u0 : u_q;
    v    = in_flags.sof ? c.v0 : v_q;
    // round to nearest: add one half, keep the integer part
    ur   = (u + fix_t'(1 << (FRAC - 1))) >>> FRAC;
    vr   = (v + fix_t'(1 << (FRAC - 1))) >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef_q <= '0; u_q <= '0; v_q <= '0; urow_q <= '0; vrow_q <= '0;
      out_valid <= 1'b0; out_flags <= '0; out_u <= '0; out_v <= '0; out_inside <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_flags <= in_valid ? in_flags : '0;
      if (in_valid) begin
        coef_q <= c;
        if (in_flags.eol) begin
          urow_q <= urow + c.uy;
          vrow_q <= vrow + c.vy;
          u_q    <= urow + c.uy;
          v_q    <= vrow + c.vy;
        end else begin
          urow_q <= urow;
          vrow_q <= vrow;
          u_q    <= u + c.ux;
          v_q    <= v + c.vx;
        end
        out_u      <= XW'(ur);
        out_v      <= YW'(vr);
        out_inside <= (ur >= 0) && (ur < fix_t'(width)) && (vr >= 0) && (vr < fix_t'(height));
      end
    end
  end
endmodule
