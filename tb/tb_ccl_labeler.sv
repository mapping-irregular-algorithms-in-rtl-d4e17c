// tb_ccl_labeler: runs a single labeler over a sequence of frames, with an
// idle gap after each frame long enough for equivalence resolution. The
// labels of frame k come out while frame k+1 is fed; they are compared
// with the flood-fill reference, with and without border-blob discard.
// Frame 1 is the two-pass example image (final labels 1, 2, 5). Also
// checks the three-cycle latency, the resolution time bounds
// n_labels*(N_PAIRS+2)+2 and N_PAIRS*(N_PAIRS-1) and that no output appears before the first
// frame has been resolved.
module tb_ccl_labeler;
  import rtip_pkg::*;
  import ccl_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0]  height = 0;
  logic        discard_border = 0;
  logic        in_valid = 0, in_pix = 0;
  rtip_flags_t in_flags = '0;
  logic        out_valid, res_busy, res_done, overrun, label_ovf, pair_ovf;
  rtip_flags_t out_flags;
  label_t      out_label;
  logic [31:0] res_cycles;

  ccl_labeler #(.X_MAX(64), .Y_MAX(64), .N_PAIRS(512)) dut (.*);

  int exp_lab [64][64];
  int ox, oy, nout, frames_out, sof_in_cycle, cyc, nl, np;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && in_valid && in_flags.sof) sof_in_cycle = cyc;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_flags.sof) begin
      ox = 0; oy = 0;
      check(cyc - sof_in_cycle == 3, $sformatf("latency %0d", cyc - sof_in_cycle));
    end
    check(out_label == label_t'(exp_lab[oy][ox]),
          $sformatf("label (%0d,%0d) got %0d exp %0d", ox, oy, out_label, exp_lab[oy][ox]));
    nout++;
    if (out_flags.eof) frames_out++;
    if (out_flags.eol) begin ox = 0; oy++; end else ox++;
  end
  always @(posedge clk) if (rst_n && res_done)
    check(res_cycles <= 32'(nl * (512 + 2) + 2) && res_cycles <= 512 * 511 && res_cycles >= 32'(nl),
          $sformatf("resolution took %0d cycles for %0d labels", res_cycles, nl));
  always @(posedge clk) if (rst_n) check(!overrun && !label_ovf && !pair_ovf, "no overrun/overflow");

  task automatic feed(int w, int h);
    height = 7'(h);
    nl = n_tmp;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = img[y][x][0];
        in_flags.sof = (x == 0 && y == 0);
        in_flags.eol = (x == w-1);
        in_flags.eof = (x == w-1 && y == h-1);
      end
    @(negedge clk); in_valid = 0; in_flags = '0;
    repeat (5) @(negedge clk);
    while (res_busy) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  // remember the reference of the frame just fed, as the expectation for
  // the output that will appear during the next frame
  task automatic latch_expect(int w, int h);
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) exp_lab[y][x] = fin[y][x];
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int w, h;
    repeat (3) @(negedge clk); rst_n = 1;
    // frame 1: the example, no discard
    example_image(); compute(12, 19, 0);
    check(fin[10][3] == 2 && fin[13][7] == 5 && fin[1][1] == 1, "reference final labels of the example");
    feed(12, 19);
    check(nout == 0, "no output before the first frame is resolved");
    latch_expect(12, 19);
    // frames 2..7: random images of the same size, discard toggled
    for (int k = 0; k < 6; k++) begin
      discard_border = k[0];
      random_image(12, 19, 30 + 8 * k);
      compute(12, 19, k[0]);
      feed(12, 19);                 // outputs the previous frame
      latch_expect(12, 19);
    end
    discard_border = 0;
    random_image(12, 19, 0);
    compute(12, 19, 0);
    feed(12, 19);                   // flush the last frame
    check(frames_out == 7, $sformatf("frames out %0d", frames_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
