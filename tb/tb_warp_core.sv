// tb_warp_core: stores a random image in one warper instance, then drives
// output scans with several mappings (identity, mirror, 90-degree turn,
// a general rotation) and compares every warped pixel with a model that
// evaluates the mapping directly and reads the stored image, background 0
// outside. Checks the two-cycle latency from scan to pixel.
module tb_warp_core;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  affine_t     coef = '0;
  logic [6:0]  width = 0, height = 0;
  logic        wr_valid = 0, rd_valid = 0, out_valid;
  rtip_flags_t wr_flags = '0, rd_flags = '0, out_flags;
  logic [7:0]  wr_pix = 0, out_pix;
  warp_core #(.PW(8), .X_MAX(64), .Y_MAX(64)) dut (.*);

  localparam int W = 24, H = 16;
  int im [H][W];
  int expq [$];
  int cyc = 0, rd_cyc [$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e, c0;
    e = expq.pop_front(); c0 = rd_cyc.pop_front();
    check(32'(out_pix) == e, $sformatf("pixel %0d exp %0d", out_pix, e));
    check(cyc - c0 == 2, $sformatf("latency %0d", cyc - c0));
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    affine_t cs [4];
    longint u, v;
    cs[0] = '{ux: 65536, uy: 0, u0: 0, vx: 0, vy: 65536, v0: 0};
    cs[1] = '{ux: -65536, uy: 0, u0: (W - 1) * 65536, vx: 0, vy: 65536, v0: 0};
    cs[2] = '{ux: 0, uy: 65536, u0: 0, vx: 65536, vy: 0, v0: 0};
    cs[3] = '{ux: 60547, uy: 25080, u0: -150000, vx: -25080, vy: 60547, v0: 250000};
    width = W; height = H;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        im[y][x] = 1 + $urandom % 255;
        wr_valid = 1; wr_pix = 8'(im[y][x]);
        wr_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
      end
    @(negedge clk); wr_valid = 0; wr_flags = '0;
    for (int k = 0; k < 4; k++) begin
      coef = cs[k];
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          rd_valid = 1;
          rd_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
          u = (longint'(cs[k].ux) * x + longint'(cs[k].uy) * y + longint'(cs[k].u0) + 32768) >>> 16;
          v = (longint'(cs[k].vx) * x + longint'(cs[k].vy) * y + longint'(cs[k].v0) + 32768) >>> 16;
          expq.push_back((u >= 0 && u < W && v >= 0 && v < H) ? im[v][u] : 0);
          rd_cyc.push_back(cyc + 1);
        end
      @(negedge clk); rd_valid = 0; rd_flags = '0;
      repeat (3) @(negedge clk);
    end
    check(expq.size() == 0, "all pixels out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
