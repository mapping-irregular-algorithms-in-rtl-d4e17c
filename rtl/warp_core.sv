// warp_core: one inverse-mapping image warper (frame buffer + affine
// transformation), affine mapping with nearest-neighbour interpolation.
//
// The core alternates between two roles, chosen by its ping-pong wrapper.
// As a writer it stores an incoming image in its frame buffer, the
// position of each pixel counted from the stream flags. As a reader it is
// driven by an output scan (valid/flags only): for each warped pixel the
// affine unit computes the source position, the frame buffer is read
// there, and the pixel, or the background value 0 when the position falls
// outside the stored image, is output. One pixel in, one pixel out.
//
// Interface: write stream (wr_*), read scan (rd_*), output stream two
// cycles after the read scan (LATENCY = 2).
module warp_core
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
  input  logic                       wr_valid,
  input  rtip_flags_t                wr_flags,
  input  logic [PW-1:0]              wr_pix,
  input  logic                       rd_valid,
  input  rtip_flags_t                rd_flags,
  output logic                       out_valid,
  output rtip_flags_t                out_flags,
  output logic [PW-1:0]              out_pix
);
  localparam int XW = $clog2(X_MAX);
  localparam int YW = $clog2(Y_MAX);

  logic [XW-1:0] wx_q, wx, a_u;
  logic [YW-1:0] wy_q, wy, a_v;
  logic          a_valid, a_inside, inside_q, valid_q;
  rtip_flags_t   a_flags, flags_q;
  logic [PW-1:0] fb_data;

  assign wx = wr_flags.sof ? '0 : wx_q;
  assign wy = wr_flags.sof ? '0 : wy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wx_q <= '0; wy_q <= '0;
    end else if (wr_valid) begin
      wx_q <= wr_flags.eol ? '0 : wx + 1'b1;
      wy_q <= wr_flags.eol ? wy + 1'b1 : wy;
    end
  end

  warp_affine #(.X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_affine (
    .clk, .rst_n, .coef, .width, .height,
    .in_valid(rd_valid), .in_flags(rd_flags),
    .out_valid(a_valid), .out_flags(a_flags), .out_u(a_u), .out_v(a_v), .out_inside(a_inside)
  );

  warp_frame_buffer #(.PW(PW), .X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_fb (
    .clk,
    .wr_en(wr_valid), .wr_x(wx), .wr_y(wy), .wr_data(wr_pix),
    .rd_en(a_valid && a_inside), .rd_x(a_u), .rd_y(a_v), .rd_data(fb_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0; flags_q <= '0; inside_q <= 1'b0;
    end else begin
      valid_q  <= a_valid;
      flags_q  <= a_flags;
      inside_q <= a_inside;
    end
  end

  assign out_valid = valid_q;
  assign out_flags = flags_q;
  assign out_pix   = (valid_q && inside_q) ? fb_data : '0;
endmodule
