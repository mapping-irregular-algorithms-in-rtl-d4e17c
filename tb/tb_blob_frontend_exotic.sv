// tb_blob_frontend_exotic: the blob analysis front end rebuilt for an
// unusual sensor, 654 x 567 pixels of 3 bits, to show that frame size and
// pixel width are only parameters (X_MAX = 654, Y_MAX = 567, PW = 3).
// Four random images (grey levels 0..3 as background, rectangles of
// levels 4..7) stream back to back with no gap. The angle is set to half a
// turn and the threshold to 4 through the configuration FIFO (the reset
// threshold of 128 does not fit in 3 bits). The labels of images 0 and 1
// are compared pixel by pixel with the model (image turned by 180 degrees,
// thresholded, flood-fill labelling); they must leave while images 3 and 4
// enter. No overrun or overflow may occur.
module tb_blob_frontend_exotic;
  import rtip_pkg::*;
  import ccl_ref_pkg::*;

  localparam int W = 654, H = 567, NIMG = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cfg_push = 0, cfg_full, cfg_err;
  cfg_word_t   cfg_word = '0;
  logic        in_valid = 0;
  rtip_flags_t in_flags = '0;
  logic [2:0]  in_pix = 0;
  logic        out_valid;
  rtip_flags_t out_flags;
  label_t      out_label;
  logic        stats_done;
  label_t      area_label = 0, bbox_label = 0, cog_label = 0;
  logic [18:0] area;
  logic        bbox_found, cog_req = 0, cog_busy, cog_ack, cog_found;
  logic [9:0]  bbox_xmin, bbox_xmax, bbox_ymin, bbox_ymax, cog_x, cog_y;
  logic [1:0]  res_busy, res_done;
  logic        overrun, label_ovf, pair_ovf;

  blob_frontend #(.X_MAX(W), .Y_MAX(H), .PW(3)) dut (.*);

  byte unsigned grey [NIMG][H][W];
  byte unsigned expf [2][H][W];
  int out_img = -1, in_img = -1, ox, oy, n_ovr = 0, n_flags = 0, npix = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_ovr++;
    if (label_ovf || pair_ovf) n_flags++;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_flags.sof) begin
      ox = 0; oy = 0; out_img++; npix = 0;
      check(in_img == out_img + 3, "image n leaves during input image n+3");
    end
    npix++;
    if (out_img < 2)
      check(out_label == label_t'(expf[out_img][oy][ox]),
            $sformatf("img %0d (%0d,%0d) got %0d exp %0d", out_img, ox, oy, out_label, expf[out_img][oy][ox]));
    if (out_flags.eof) check(npix == W * H && ox == W - 1 && oy == H - 1, "frame shape");
    if (out_flags.eol) begin ox = 0; oy++; end else ox++;
  end

  task automatic feed(int f);
    in_img++;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = 3'(grey[f][y][x]);
        in_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
      end
  endtask

  task automatic push(cfg_word_t w);
    @(negedge clk); cfg_push = 1; cfg_word = w;
    @(negedge clk); cfg_push = 0;
  endtask

  initial begin
    repeat (NIMG * W * H + 100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int x0, y0, w, h;
    for (int f = 0; f < NIMG; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) grey[f][y][x] = 8'($urandom % 4);
      for (int r = 0; r < 40; r++) begin
        w = 5 + $urandom % 70; h = 5 + $urandom % 70;
        x0 = $urandom % (W - w); y0 = $urandom % (H - h);
        for (int y = y0; y < y0 + h; y++) for (int x = x0; x < x0 + w; x++)
          grey[f][y][x] = 8'(4 + $urandom % 4);
      end
    end
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[y][x] = (grey[f][H-1-y][W-1-x] >= 4) ? 1 : 0;
      compute(W, H, 0);
      check(n_tmp <= 254 && n_pairs <= 512, $sformatf("image %0d within limits (%0d labels, %0d pairs)", f, n_tmp, n_pairs));
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) expf[f][y][x] = 8'(fin[y][x]);
    end
    repeat (3) @(negedge clk); rst_n = 1;
    push('{op: OP_ROTATE, addr: 0, value: 16'd32768});
    push('{op: OP_BIN, addr: 0, value: 16'd4});
    repeat (100) @(negedge clk);
    for (int f = 0; f < NIMG; f++) feed(f);
    @(negedge clk); in_valid = 0; in_flags = '0;
    repeat (10) @(negedge clk);
    check(out_img == 1, $sformatf("images out %0d", out_img + 1));
    check(n_ovr == 0 && n_flags == 0, "no overrun or overflow at 654x567");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
