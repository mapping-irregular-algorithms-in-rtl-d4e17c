// tb_ccl_onthefly_512: the on-the-fly labeler at its full size, under the
// heaviest equivalence load it is built for.
//
// Frames of 512 x 511 pixels, the smallest size for which on-the-fly
// operation is guaranteed with a 512-pair table, stream back to back with
// no gap. The first three carry a synthetic image that uses all 254
// temporary labels and fills the equivalence table with exactly 512 pairs:
//   - 250 short vertical bars in columns 0..498 (rows 0..9) joined by a
//     line on row 10, giving 249 pairs;
//   - two pairs of long bars on the right (columns 500/502 and 508/510).
//     In each pair the right bar starts one row higher, so it holds the
//     smaller label and the bridges on every other row repeat the same
//     pair; bridging both pairs on each row makes the table entries
//     alternate, so no entry is skipped as a repeat. 132 bridge rows give
//     the remaining 263 pairs.
// Every label then sits in a pair, so the depth-first search scans the
// whole table once per label, its worst case. The labeler must still
// finish each resolution inside one image period (no overrun, resolution
// time at most 512 * 511 clocks), label every pixel like the flood-fill
// reference, with and without border discard, and deliver image n while
// image n+2 enters. A small example image and blank frames follow.
module tb_ccl_onthefly_512;
  import rtip_pkg::*;
  import ccl_ref_pkg::*;

  localparam int W = 512, H = 511, NF = 6;
  localparam int BOUND = 512 * 511;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  height = 10'(H);
  logic        discard_border = 0, in_valid = 0, in_pix = 0;
  rtip_flags_t in_flags = '0;
  logic        out_valid, overrun, label_ovf, pair_ovf;
  rtip_flags_t out_flags;
  label_t      out_label;
  logic [1:0]  res_done, res_busy;
  logic [31:0] res_cycles_odd, res_cycles_even;

  ccl_pingpong dut (.*);

  byte unsigned exp_lab [4][H][W];
  int in_frame = 0, out_frame = 0, npix = 0, ox = 0, oy = 0;
  int n_overrun = 0, n_lovf = 0, n_povf = 0, n_res = 0, n_heavy = 0, max_cycles = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // resolution results: the first three frames are the heavy ones
  always @(posedge clk) if (rst_n) begin
    if (overrun) n_overrun++;
    if (label_ovf) n_lovf++;
    if (pair_ovf) n_povf++;
    for (int i = 0; i < 2; i++)
      if (res_done[i]) begin
        automatic int cyc = (i == 0) ? res_cycles_odd : res_cycles_even;
        n_res++;
        if (n_res <= 3) begin
          check(cyc > 254 * 512, $sformatf("resolution %0d took only %0d cycles", n_res, cyc));
          if (cyc > 254 * 512) n_heavy++;
        end
        check(cyc <= BOUND, $sformatf("resolution %0d took %0d cycles, bound %0d", n_res, cyc, BOUND));
        if (cyc > max_cycles) max_cycles = cyc;
      end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_flags.sof) begin
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

  function automatic void heavy_image();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 0;
    for (int i = 0; i < 250; i++) for (int y = 0; y < 10; y++) img[y][2 * i] = 1;
    for (int x = 0; x <= 498; x++) img[10][x] = 1;
    for (int y = 0; y < H; y++) begin
      img[y][502] = 1; img[y][510] = 1;
      if (y > 0) begin img[y][500] = 1; img[y][508] = 1; end
    end
    for (int k = 0; k < 132; k++) begin
      img[12 + 2 * k][501] = 1;
      if (k < 131) img[12 + 2 * k][509] = 1;
    end
  endfunction

  task automatic feed();
    in_frame++;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = img[y][x][0];
        in_flags.sof = (x == 0 && y == 0);
        in_flags.eol = (x == W-1);
        in_flags.eof = (x == W-1 && y == H-1);
      end
  endtask

  initial begin
    repeat (NF * W * H + 200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 1; k <= NF; k++) begin
      discard_border = (k == 2);
      if (k <= 3) heavy_image();
      else begin
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 0;
        if (k == 4) example_image();
      end
      compute(W, H, discard_border);
      if (k <= 3) check(n_tmp == 254 && n_pairs == 512,
                        $sformatf("load image has %0d labels, %0d pairs", n_tmp, n_pairs));
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) exp_lab[k % 4][y][x] = 8'(fin[y][x]);
      feed();
    end
    @(negedge clk); in_valid = 0; in_flags = '0;
    repeat (10) @(negedge clk);
    check(out_frame == NF - 2 && npix == W * H, $sformatf("images out %0d", out_frame));
    check(n_heavy == 3, $sformatf("%0d full-table resolutions", n_heavy));
    check(n_overrun == 0, $sformatf("%0d overruns", n_overrun));
    check(n_lovf == 0 && n_povf == 0, "no label or pair overflow at 254 labels / 512 pairs");
    $display("longest resolution %0d cycles of %0d available", max_cycles, BOUND);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
