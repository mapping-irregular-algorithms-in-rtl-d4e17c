// tb_ccl_pingpong: streams frames back to back, with no gap, through the
// on-the-fly labeler. Labelled image n must leave while image n+2 enters;
// every output pixel is compared with the flood-fill reference. Frames
// alternate between the odd and even labeler, and no overrun may occur as
// long as each image period covers the resolution time. A final burst of
// tiny comb-shaped frames must make a labeler report an overrun.
module tb_ccl_pingpong;
  import rtip_pkg::*;
  import ccl_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0]  height = 0;
  logic        discard_border = 0, in_valid = 0, in_pix = 0;
  rtip_flags_t in_flags = '0;
  logic        out_valid, overrun, label_ovf, pair_ovf;
  rtip_flags_t out_flags;
  label_t      out_label;
  logic [1:0]  res_done, res_busy;
  logic [31:0] res_cycles_odd, res_cycles_even;

  ccl_pingpong #(.X_MAX(64), .Y_MAX(64), .N_PAIRS(512)) dut (.*);

  localparam int W = 40, H = 30;
  int exp_lab [4][64][64];
  int in_frame = 0, out_frame = 0, npix = 0, ox, oy, n_overrun = 0, n_done_odd = 0, n_done_even = 0;
  bit check_out = 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_overrun++;
    if (res_done[0]) n_done_odd++;
    if (res_done[1]) n_done_even++;
  end
  always @(posedge clk) if (rst_n && out_valid && check_out) begin
    if (out_flags.sof) begin
      if (out_frame > 0) check(npix == W * H, $sformatf("image %0d had %0d pixels", out_frame, npix));
      ox = 0; oy = 0; out_frame++; npix = 0;
      check(in_frame == out_frame + 2, $sformatf("image %0d leaves during image %0d", out_frame, in_frame));
    end
    check(out_label == label_t'(exp_lab[out_frame % 4][oy][ox]),
          $sformatf("img %0d (%0d,%0d) got %0d exp %0d", out_frame, ox, oy, out_label,
                    exp_lab[out_frame % 4][oy][ox]));
    npix++;
    if (out_flags.eof) check(npix == W * H, $sformatf("image %0d has %0d pixels", out_frame, npix));
    if (out_flags.eol) begin ox = 0; oy++; end else ox++;
  end

  task automatic feed(int w, int h);
    height = 7'(h);
    in_frame++;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = img[y][x][0];
        in_flags.sof = (x == 0 && y == 0);
        in_flags.eol = (x == w-1);
        in_flags.eof = (x == w-1 && y == h-1);
      end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 1; k <= 10; k++) begin
      discard_border = (k % 3 == 0);
      if (k == 1) example_image(); else random_image(W, H, (k > 8) ? 0 : 30 + 3 * k);
      compute((k == 1) ? 12 : W, (k == 1) ? 19 : H, discard_border);
      for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) exp_lab[k % 4][y][x] = fin[y][x];
      // the example is smaller: pad it into a W x H frame of background
      if (k == 1) begin
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
          if (x >= 12 || y >= 19) img[y][x] = 0;
      end
      feed(W, H);
    end
    @(negedge clk); in_valid = 0; in_flags = '0;
    repeat (10) @(negedge clk);
    check(out_frame == 8 && npix == W * H, $sformatf("images out %0d, last has %0d pixels", out_frame, npix));
    check(n_overrun == 0, "no overrun at 40x30");
    check(n_done_odd == 5 && n_done_even == 5, "images alternate between the two labelers");
    // tiny cluttered frames: resolution cannot keep up
    check_out = 0;
    for (int k = 0; k < 6; k++) begin
      // comb: 16 teeth joined by a bar, 16 labels and 15 pairs in 64 pixels
      for (int x = 0; x < 32; x++) begin img[0][x] = (x % 2 == 0) ? 1 : 0; img[1][x] = 1; end
      feed(32, 2);
    end
    @(negedge clk); in_valid = 0; in_flags = '0;
    repeat (10) @(negedge clk);
    check(n_overrun > 0, $sformatf("overrun seen %0d times on 32x2 frames", n_overrun));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
