// tb_blob_frontend_full: the blob analysis front end at its full size
// (512x512 frames, 512 equivalence pairs), no parameter overridden. Five
// images of 512x512 pixels, each made of 40 random rectangles, are
// streamed back to back with no gap, rotated by 90 degrees, thresholded
// at the default 128 and labelled. This image size is the smallest for
// which resolution time (at most 512*511 cycles) fits within one image,
// so no overrun may occur. The labels of images 0 and 1 are checked pixel
// by pixel against the model, and the area, bounding box and centre of
// gravity of every blob of image 0 are read while image 4 streams in.
module tb_blob_frontend_full;
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
  logic [18:0] area;
  logic        bbox_found, cog_req = 0, cog_busy, cog_ack, cog_found;
  logic [8:0]  bbox_xmin, bbox_xmax, bbox_ymin, bbox_ymax, cog_x, cog_y;
  logic [1:0]  res_busy, res_done;
  logic        overrun, label_ovf, pair_ovf;

  blob_frontend dut (.*);

  localparam int S = 512, NIMG = 5;
  byte unsigned grey [NIMG][S][S];
  byte unsigned expf [2][S][S];
  int out_img = -1, in_img = -1, ox, oy, n_ovr = 0, n_res = 0, n_err_flags = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_ovr++;
    if (label_ovf || pair_ovf) n_err_flags++;
    if (res_done != 0) n_res++;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_flags.sof) begin
      ox = 0; oy = 0; out_img++;
      check(in_img == out_img + 3, "image order");
    end
    if (out_img < 2)
      check(out_label == label_t'(expf[out_img][oy][ox]),
            $sformatf("img %0d (%0d,%0d) got %0d exp %0d", out_img, ox, oy, out_label, expf[out_img][oy][ox]));
    if (out_flags.eol) begin ox = 0; oy++; end else ox++;
  end

  task automatic feed(int f);
    in_img++;
    for (int y = 0; y < S; y++)
      for (int x = 0; x < S; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = grey[f][y][x];
        in_flags = '{sof: (x == 0 && y == 0), eol: (x == S-1), eof: (x == S-1 && y == S-1)};
      end
  endtask

  task automatic check_stats();
    int n [256], sx [256], sy [256], x0 [256], x1 [256], y0 [256], y1 [256], l;
    for (int i = 0; i < 256; i++) begin n[i] = 0; sx[i] = 0; sy[i] = 0; x0[i] = S; x1[i] = -1; y0[i] = S; y1[i] = -1; end
    for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) begin
      l = expf[0][y][x];
      if (l != 0 && l != 255) begin
        n[l]++; sx[l] += x; sy[l] += y;
        if (x < x0[l]) x0[l] = x; if (x > x1[l]) x1[l] = x;
        if (y < y0[l]) y0[l] = y; if (y > y1[l]) y1[l] = y;
      end
    end
    for (int i = 0; i < 256; i++) begin
      area_label = 8'(i); bbox_label = 8'(i);
      @(posedge clk); #1;
      check(32'(area) == n[i], $sformatf("label %0d area %0d exp %0d", i, area, n[i]));
      if (n[i] != 0) begin
        check(bbox_found && bbox_xmin == 9'(x0[i]) && bbox_xmax == 9'(x1[i]) &&
              bbox_ymin == 9'(y0[i]) && bbox_ymax == 9'(y1[i]), $sformatf("label %0d bbox", i));
        @(posedge clk); #1 cog_req = 1; cog_label = 8'(i);
        @(posedge clk); #1 cog_req = 0;
        while (!cog_ack) @(posedge clk);
        #1 check(cog_found && 32'(cog_x) == sx[i] / n[i] && 32'(cog_y) == sy[i] / n[i],
                 $sformatf("label %0d centre", i));
      end
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int x0, y0, w, h, nl;
    for (int f = 0; f < NIMG; f++) begin
      for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) grey[f][y][x] = 8'($urandom % 100);
      for (int r = 0; r < 40; r++) begin
        w = 5 + $urandom % 60; h = 5 + $urandom % 60;
        x0 = $urandom % (S - w); y0 = $urandom % (S - h);
        for (int y = y0; y < y0 + h; y++) for (int x = x0; x < x0 + w; x++)
          grey[f][y][x] = 8'(150 + $urandom % 100);
      end
    end
    // model of images 0 and 1: rotation by 90 degrees, threshold 128
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < S; y++) for (int x = 0; x < S; x++)
        img[y][x] = (grey[f][S-1-x][y] >= 128) ? 1 : 0;
      compute(S, S, 0);
      check(n_tmp <= 254 && n_pairs <= 512, $sformatf("image %0d within limits (%0d labels, %0d pairs)", f, n_tmp, n_pairs));
      for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) expf[f][y][x] = 8'(fin[y][x]);
      nl = n_tmp;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); cfg_push = 1; cfg_word = '{op: OP_ROTATE, addr: 0, value: 16'd16384};
    @(negedge clk); cfg_push = 0;
    repeat (100) @(negedge clk);
    for (int f = 0; f < 4; f++) feed(f);
    fork
      feed(4);
      begin
        while (!stats_done) @(posedge clk);
        check_stats();
      end
    join
    @(negedge clk); in_valid = 0; in_flags = '0;
    repeat (10) @(negedge clk);
    check(out_img == 1, $sformatf("images out %0d", out_img + 1));
    check(n_ovr == 0 && n_err_flags == 0, "no overrun or overflow at 512x512");
    check(n_res >= 3, "equivalence resolutions done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
