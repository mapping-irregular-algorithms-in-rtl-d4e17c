// warp_frame_buffer: frame buffer of the inverse-mapping warper.
//
// Stores one input image, written in raster order by position (x, y), and
// returns the pixel at an arbitrary position (u, v) one cycle after a read
// request, which is what inverse mapping needs: the warped image is
// produced in scanline order but reads its source pixels in an order set
// by the mapping. Lines are stored with a stride of X_MAX. One write and
// one read port; the warper never reads and writes the same image at once.
module warp_frame_buffer #(
  parameter int unsigned PW    = 8,
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512,
  localparam int unsigned XW   = $clog2(X_MAX),
  localparam int unsigned YW   = $clog2(Y_MAX)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [XW-1:0] wr_x,
  input  logic [YW-1:0] wr_y,
  input  logic [PW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [XW-1:0] rd_x,
  input  logic [YW-1:0] rd_y,
  output logic [PW-1:0] rd_data
);
  localparam int unsigned DEPTH = X_MAX * Y_MAX;
  localparam int AW = $clog2(DEPTH);

  logic [PW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[AW'(wr_y) * AW'(X_MAX) + AW'(wr_x)] <= wr_data;
    if (rd_en) rd_data <= mem[AW'(rd_y) * AW'(X_MAX) + AW'(rd_x)];
  end
endmodule
