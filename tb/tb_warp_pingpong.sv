// tb_warp_pingpong: streams random images back to back through the
// two-instance warper with a 90-degree turn mapping, changing the mapping
// between frames. Warped image n must leave while image n+1 enters, pixel
// for pixel, two cycles behind it; every pixel is compared with a model.
module tb_warp_pingpong;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  affine_t     coef = '0;
  logic [6:0]  width = 0, height = 0;
  logic        in_valid = 0, out_valid;
  rtip_flags_t in_flags = '0, out_flags;
  logic [7:0]  in_pix = 0, out_pix;
  warp_pingpong #(.PW(8), .X_MAX(64), .Y_MAX(64)) dut (.*);

  localparam int W = 20, H = 20, NF = 6;
  int im [NF][H][W];
  affine_t cs [NF];
  int in_frame = 0, out_frame = 0, ox, oy, npix, cyc = 0, sof_cyc;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && in_valid && in_flags.sof) sof_cyc = cyc;
  always @(posedge clk) if (rst_n && out_valid) begin
    longint u, v;
    int e;
    affine_t c;
    if (out_flags.sof) begin
      ox = 0; oy = 0; out_frame++; npix = 0;
      check(in_frame == out_frame + 1, $sformatf("image %0d during image %0d", out_frame, in_frame));
      check(cyc - sof_cyc == 2, "latency");
    end
    c = cs[out_frame];     // mapping applied when image out_frame is read out
    u = (longint'(c.ux) * ox + longint'(c.uy) * oy + longint'(c.u0) + 32768) >>> 16;
    v = (longint'(c.vx) * ox + longint'(c.vy) * oy + longint'(c.v0) + 32768) >>> 16;
    e = (u >= 0 && u < W && v >= 0 && v < H) ? im[out_frame - 1][v][u] : 0;
    check(32'(out_pix) == e, $sformatf("img %0d (%0d,%0d) got %0d exp %0d", out_frame, ox, oy, out_pix, e));
    npix++;
    if (out_flags.eof) check(npix == W * H, "pixel count");
    if (out_flags.eol) begin ox = 0; oy++; end else ox++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    width = W; height = H;
    for (int f = 0; f < NF; f++) begin
      if (f[0]) cs[f] = '{ux: 0, uy: 65536, u0: 0, vx: -65536, vy: 0, v0: (H - 1) * 65536};
      else      cs[f] = '{ux: 65536, uy: 0, u0: 2 * 65536, vx: 0, vy: 65536, v0: -65536};
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) im[f][y][x] = 1 + $urandom % 255;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      in_frame++;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          coef = cs[f];
          in_valid = 1; in_pix = 8'(im[f][y][x]);
          in_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
        end
    end
    @(negedge clk); in_valid = 0; in_flags = '0;
    repeat (4) @(negedge clk);
    check(out_frame == NF - 1, $sformatf("images out %0d", out_frame));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
