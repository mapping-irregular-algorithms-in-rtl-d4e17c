// tb_warp_affine: scans output frames with several coefficient sets
// (identity, translation, scaling, a rotation, a shear) and checks every
// rounded source position and inside flag against a direct evaluation of
// u = ux*x + uy*y + u0 (and v likewise) with 64-bit integers; coefficients
// changed in mid-frame must not take effect before the next frame.
module tb_warp_affine;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  affine_t     coef = '0;
  logic [6:0]  width = 0, height = 0;
  logic        in_valid = 0, out_valid, out_inside;
  rtip_flags_t in_flags = '0, out_flags;
  logic [5:0]  out_u, out_v;
  warp_affine #(.X_MAX(64), .Y_MAX(64)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint rnd(longint a);   // floor(a / 2^16 + 1/2)
    return (a + 32768) >>> 16;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    affine_t cs [5];
    longint u, v;
    int W, H;
    cs[0] = '{ux: 65536, uy: 0, u0: 0, vx: 0, vy: 65536, v0: 0};
    cs[1] = '{ux: 65536, uy: 0, u0: -3 * 65536 - 100, vx: 0, vy: 65536, v0: 5 * 65536 + 7};
    cs[2] = '{ux: 32768, uy: 0, u0: 10, vx: 0, vy: 98304, v0: 0};
    cs[3] = '{ux: 56756, uy: 32768, u0: -120000, vx: -32768, vy: 56756, v0: 400000};
    cs[4] = '{ux: 65536, uy: 21000, u0: 0, vx: -9000, vy: 65536, v0: 131072};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      W = 20 + 3 * k; H = 9 + k;
      width = 7'(W); height = 7'(H);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          coef = (x == 0 && y == 0) ? cs[k] : cs[(k + 1) % 5];
          in_valid = 1;
          in_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
          u = rnd(longint'(cs[k].ux) * x + longint'(cs[k].uy) * y + longint'(cs[k].u0));
          v = rnd(longint'(cs[k].vx) * x + longint'(cs[k].vy) * y + longint'(cs[k].v0));
          @(posedge clk); #1;
          check(out_valid && out_flags == in_flags, "valid/flags");
          check(out_inside == (u >= 0 && u < W && v >= 0 && v < H), $sformatf("inside at (%0d,%0d)", x, y));
          if (u >= 0 && u < W && v >= 0 && v < H)
            check(out_u == 6'(u) && out_v == 6'(v),
                  $sformatf("set %0d (%0d,%0d) -> (%0d,%0d) exp (%0d,%0d)", k, x, y, out_u, out_v, u, v));
          // idle cycle now and then
          if ((x + y) % 7 == 3) begin @(negedge clk); in_valid = 0; in_flags = '0; end
        end
      @(negedge clk); in_valid = 0; in_flags = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
