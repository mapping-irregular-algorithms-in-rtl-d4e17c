// tb_bin_threshold: random grey levels against changing thresholds; checks
// the one-cycle latency, the comparison (pixel >= threshold) and that the
// threshold only takes effect at the start of a frame.
module tb_bin_threshold;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  threshold = 0, in_pix = 0;
  logic        in_valid = 0, out_valid, out_bin;
  rtip_flags_t in_flags = '0, out_flags;
  bin_threshold #(.PW(8)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] frame_thr;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      frame_thr = (f == 0) ? 8'd128 : 8'($urandom);
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        threshold = (i == 0) ? frame_thr : 8'($urandom);
        in_valid = ($urandom % 4 != 0) || i == 0;
        in_pix = (i == 1) ? frame_thr : (i == 2) ? frame_thr - 8'd1 : 8'($urandom);
        in_flags = in_valid ? '{sof: (i == 0), eol: (i % 30 == 29), eof: 1'b0} : '0;
        @(posedge clk); #1;
        check(out_valid == in_valid, "valid");
        if (in_valid)
          check(out_bin == (in_pix >= frame_thr) && out_flags == in_flags,
                $sformatf("pix %0d thr %0d -> %0d", in_pix, frame_thr, out_bin));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
