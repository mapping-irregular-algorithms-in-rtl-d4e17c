// tb_blob_frontend: end-to-end test of the blob analysis front end at
// reduced size (64x64 maximum frame, 64 equivalence pairs). Random
// grey-level images of 32x32 pixels go through rotation by 0, 90 or 180
// degrees, binarisation with a per-image threshold and labelling with or
// without border-blob discard, all set through the configuration FIFO.
// Every labelled pixel is compared with a model (rotation by index
// arithmetic, thresholding, flood-fill labelling), and the area, bounding
// box and centre of gravity of every blob are read back and compared.
// Special images make the labeler exceed 254 labels and 64 pairs, and a
// final run of tiny comb-shaped frames makes equivalence resolution
// overrun. Each of these mechanisms is counted and must occur.
module tb_blob_frontend;
  import rtip_pkg::*;
  import ccl_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cfg_push = 0, cfg_full, cfg_err;
  cfg_word_t   cfg_word = '0;
  logic        in_valid = 0;
  rtip_flags_t in_flags = '0;
  logic [7:0]  in_pix = 0;
  logic        out_valid;
  rtip_flags_t out_flags;
  label_t      out_label;
  logic        stats_done;
  label_t      area_label = 0, bbox_label = 0, cog_label = 0;
  logic [12:0] area;
  logic        bbox_found, cog_req = 0, cog_busy, cog_ack, cog_found;
  logic [5:0]  bbox_xmin, bbox_xmax, bbox_ymin, bbox_ymax, cog_x, cog_y;
  logic [1:0]  res_busy, res_done;
  logic        overrun, label_ovf, pair_ovf;

  blob_frontend #(.X_MAX(64), .Y_MAX(64), .N_PAIRS(64), .PW(8)) dut (.*);

  localparam int S = 32;
  localparam int NIMG = 14;
  int  grey [S][S];
  int  expf [NIMG][S][S];      // expected labels of each image
  bit  chk  [NIMG];            // image is checked
  int  out_img = -1, in_img = -1, ox, oy;
  bit  checking = 1;
  // mechanism counters
  int  n_rot = 0, n_thr = 0, n_disc255 = 0, n_pairs_img = 0, n_lovf = 0, n_povf = 0,
       n_ovr = 0, n_res_odd = 0, n_res_even = 0, n_cfg_err = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_ovr++;
    if (label_ovf) n_lovf++;
    if (pair_ovf) n_povf++;
    if (res_done[0]) n_res_odd++;
    if (res_done[1]) n_res_even++;
    if (cfg_err) n_cfg_err++;
  end

  always @(posedge clk) if (rst_n && out_valid && checking) begin
    if (out_flags.sof) begin
      ox = 0; oy = 0; out_img++;
      check(in_img == out_img + 3, $sformatf("image %0d leaves during image %0d", out_img, in_img));
    end
    if (out_label == 8'd255) n_disc255++;
    if (chk[out_img])
      check(out_label == label_t'(expf[out_img][oy][ox]),
            $sformatf("img %0d (%0d,%0d) got %0d exp %0d", out_img, ox, oy, out_label, expf[out_img][oy][ox]));
    if (out_flags.eol) begin ox = 0; oy++; end else ox++;
  end

  task automatic cfg(logic [7:0] op, logic [7:0] addr, logic [15:0] value);
    @(negedge clk); cfg_push = 1; cfg_word = '{op: op, addr: addr, value: value};
    @(negedge clk); cfg_push = 0;
  endtask

  task automatic feed(int w, int h);
    in_img++;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = 8'(grey[y][x]);
        in_flags = '{sof: (x == 0 && y == 0), eol: (x == w-1), eof: (x == w-1 && y == h-1)};
      end
    @(negedge clk); in_valid = 0; in_flags = '0;
  endtask

  // measurements of image k against its expected labels
  task automatic check_stats(int k);
    int n [256], sx [256], sy [256], x0 [256], x1 [256], y0 [256], y1 [256], l;
    for (int i = 0; i < 256; i++) begin n[i] = 0; sx[i] = 0; sy[i] = 0; x0[i] = 99; x1[i] = -1; y0[i] = 99; y1[i] = -1; end
    for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) begin
      l = expf[k][y][x];
      if (l != 0 && l != 255) begin
        n[l]++; sx[l] += x; sy[l] += y;
        if (x < x0[l]) x0[l] = x; if (x > x1[l]) x1[l] = x;
        if (y < y0[l]) y0[l] = y; if (y > y1[l]) y1[l] = y;
      end
    end
    for (int i = 0; i < 256; i++) begin
      area_label = 8'(i); bbox_label = 8'(i); #1;
      check(32'(area) == n[i], $sformatf("img %0d label %0d area %0d exp %0d", k, i, area, n[i]));
      check(bbox_found == (n[i] != 0), "bbox found");
      if (n[i] != 0) begin
        check(bbox_xmin == 6'(x0[i]) && bbox_xmax == 6'(x1[i]) && bbox_ymin == 6'(y0[i]) && bbox_ymax == 6'(y1[i]),
              $sformatf("img %0d label %0d bbox", k, i));
        @(negedge clk); cog_req = 1; cog_label = 8'(i);
        @(negedge clk); cog_req = 0;
        while (!cog_ack) @(negedge clk);
        check(cog_found && 32'(cog_x) == sx[i] / n[i] && 32'(cog_y) == sy[i] / n[i],
              $sformatf("img %0d label %0d centre (%0d,%0d)", k, i, cog_x, cog_y));
      end
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ang, thr, rot [S][S], gv, n_stats = 0;
    bit disc;
    repeat (3) @(negedge clk); rst_n = 1;
    cfg(OP_FRAME, 0, S); cfg(OP_FRAME, 1, S);
    cfg(8'd7, 0, 0);                              // unknown operator, ignored
    repeat (60) @(negedge clk);
    for (int i = 0; i < NIMG; i++) begin
      // pick the image and its settings
      ang  = (i % 3 == 0) ? 0 : (i % 3 == 1) ? 16384 : 32768;
      thr  = (i % 2 == 0) ? 100 : 200;
      disc = (i % 4 == 3);
      for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) begin
        bit fg;
        if (i == 6)      fg = (x % 2 == 0) && (y % 2 == 0);          // 256 single dots
        else if (i == 8) fg = ($urandom % 100) < 62;                  // cluttered
        else             fg = ($urandom % 100) < 38;
        if (thr == 100) gv = fg ? 200 + $urandom % 56 : $urandom % 100;
        else            gv = fg ? 200 + $urandom % 56 : 100 + $urandom % 100;
        grey[y][x] = gv;
      end
      // model: rotate, threshold, label
      for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) begin
        if (ang == 0)          rot[y][x] = grey[y][x];
        else if (ang == 16384) rot[y][x] = grey[S-1-x][y];
        else                   rot[y][x] = grey[S-1-y][S-1-x];
        img[y][x] = (rot[y][x] >= thr) ? 1 : 0;
      end
      compute(S, S, disc);
      for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) expf[i][y][x] = fin[y][x];
      chk[i] = (n_tmp <= 254) && (n_pairs <= 64);
      if (n_pairs > 0 && chk[i]) n_pairs_img++;
      if (ang != 0) n_rot++;
      if (thr != 128) n_thr++;
      if (i == 6) check(n_tmp > 254, "image 6 exceeds the label count");
      if (i == 8) check(n_pairs > 64, $sformatf("image 8 exceeds the pair table (%0d)", n_pairs));
      feed(S, S);
      // settings for image i, taken when it reaches each operator
      cfg(OP_ROTATE, 0, 16'(ang)); cfg(OP_BIN, 0, 16'(thr)); cfg(OP_CCL, 0, 16'(disc));
      repeat (50) @(negedge clk);
      while (res_busy != 0) @(negedge clk);
      if (i >= 3 && chk[i-3]) begin check_stats(i - 3); n_stats++; end
    end
    // flush the last images out of the chain
    for (int k = 0; k < 3; k++) begin
      for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) grey[y][x] = 0;
      feed(S, S);
      repeat (50) @(negedge clk);
      while (res_busy != 0) @(negedge clk);
      if (chk[NIMG - 3 + k]) begin check_stats(NIMG - 3 + k); n_stats++; end
    end
    check(out_img == NIMG - 1, $sformatf("images out %0d", out_img + 1));
    check(n_ovr == 0, "no overrun with resolution time between frames");
    // tiny comb frames back to back: resolution cannot keep up
    checking = 0;
    cfg(OP_FRAME, 1, 2); cfg(OP_ROTATE, 0, 0); cfg(OP_BIN, 0, 100);
    repeat (60) @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      for (int x = 0; x < S; x++) begin grey[0][x] = (x % 2 == 0) ? 255 : 0; grey[1][x] = 255; end
      feed(S, 2);
    end
    repeat (20) @(negedge clk);
    // mechanisms
    $display("rotations %0d, threshold changes %0d, images with pairs %0d, border labels %0d",
             n_rot, n_thr, n_pairs_img, n_disc255);
    $display("resolutions odd %0d even %0d, label overflows %0d, pair overflows %0d, overruns %0d, stats %0d",
             n_res_odd, n_res_even, n_lovf, n_povf, n_ovr, n_stats);
    check(n_rot > 0 && n_thr > 0 && n_pairs_img > 0 && n_disc255 > 0, "rotation, threshold, pairs, discard");
    check(n_res_odd > 0 && n_res_even > 0, "both labelers used");
    check(n_lovf > 0 && n_povf > 0, "label and pair overflow");
    check(n_ovr > 0, "overrun");
    check(n_cfg_err == 1, "configuration error");
    check(n_stats >= 10, "measurements read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
