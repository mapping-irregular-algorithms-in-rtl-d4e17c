// tb_ccl_pass1: checks the first labelling pass against the reference
// L-mask labelling, on the two-pass example image (temporary labels and
// equivalence pairs {3,2} and {4,3}) and on random images; checks the
// end-of-frame label count and that every stored pair holds two different
// labels, larger first.
module tb_ccl_pass1;
  import rtip_pkg::*;
  import ccl_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0]  height;
  logic        in_valid = 0, in_pix = 0;
  rtip_flags_t in_flags = '0;
  logic        out_valid, pair_we, mark_border, done, label_ovf, pair_ovf;
  rtip_flags_t out_flags;
  label_t      out_label, pair_a, pair_b, mark_label;
  logic [8:0]  pair_idx;
  logic [7:0]  n_labels;
  logic [9:0]  n_pairs;

  ccl_pass1 #(.X_MAX(64), .Y_MAX(64), .N_PAIRS(512)) dut (.*);

  int W, H, ox, oy, npairs_seen;
  bit pair_set [256][256];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_flags.sof) begin ox = 0; oy = 0; end
    check(out_label == label_t'(tmp[oy][ox]),
          $sformatf("temp label (%0d,%0d) got %0d exp %0d", ox, oy, out_label, tmp[oy][ox]));
    if (out_flags.eol) begin ox = 0; oy++; end else ox++;
  end
  always @(posedge clk) if (rst_n && pair_we) begin
    check(pair_a > pair_b && pair_b != 0, "pair ordering");
    pair_set[pair_a][pair_b] = 1;
    npairs_seen++;
  end
  always @(posedge clk) if (rst_n && done) begin
    check(n_labels == 8'(n_tmp), $sformatf("n_labels %0d exp %0d", n_labels, n_tmp));
    check(32'(n_pairs) == npairs_seen, "n_pairs");
    check(!label_ovf && !pair_ovf, "no overflow");
  end

  task automatic feed(int w, int h);
    W = w; H = h; height = 7'(h);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = img[y][x][0];
        in_flags.sof = (x == 0 && y == 0);
        in_flags.eol = (x == w-1);
        in_flags.eof = (x == w-1 && y == h-1);
      end
    @(negedge clk); in_valid = 0; in_flags = '0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    height = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    example_image(); compute(12, 19, 0);
    check(tmp[10][3] == 4 && tmp[13][7] == 5, "reference reproduces the example");
    pair_set = '{default: 0}; npairs_seen = 0;
    feed(12, 19);
    check(pair_set[3][2] && pair_set[4][3], "example pairs 3-2 and 4-3 stored");
    for (int a = 0; a < 256; a++) for (int b = 0; b < 256; b++)
      if (pair_set[a][b] && !((a == 3 && b == 2) || (a == 4 && b == 3))) check(0, "extra pair");
    for (int k = 0; k < 6; k++) begin
      random_image(20 + k, 9 + k, 45);
      compute(20 + k, 9 + k, 0);
      npairs_seen = 0;
      feed(20 + k, 9 + k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
