// tb_blob_centroid: streams random label frames, then requests the centre
// of gravity of every label present (and some absent ones) and compares
// it with the truncated mean position computed in the testbench; checks
// the divider latency of CW+1 cycles and a read issued while the next
// frame streams in.
module tb_blob_centroid;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0, frame_done, rd_req = 0, rd_busy, rd_ack, rd_found;
  rtip_flags_t in_flags = '0;
  label_t      in_label = 0, rd_label = 0;
  logic [5:0]  rd_cx, rd_cy;
  blob_centroid #(.X_MAX(64), .Y_MAX(64)) dut (.*);

  localparam int W = 40, H = 20;
  int sx [2][256], sy [2][256], n [2][256];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic read_one(int f, int l);
    int b, t;
    b = f % 2;
    @(negedge clk); rd_req = 1; rd_label = 8'(l);
    @(negedge clk); rd_req = 0; t = 1;
    while (!rd_ack) begin @(negedge clk); t++; end
    if (l == 0 || l == 255 || n[b][l] == 0) check(!rd_found && t == 1, $sformatf("label %0d absent", l));
    else begin
      check(rd_found && 32'(rd_cx) == sx[b][l] / n[b][l] && 32'(rd_cy) == sy[b][l] / n[b][l],
            $sformatf("frame %0d label %0d centre (%0d,%0d) exp (%0d,%0d)", f, l, rd_cx, rd_cy,
                      sx[b][l] / n[b][l], sy[b][l] / n[b][l]));
      check(t == 6 + 1, $sformatf("latency %0d", t));
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int b, l;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      b = f % 2;
      for (int i = 0; i < 256; i++) begin sx[b][i] = 0; sy[b][i] = 0; n[b][i] = 0; end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          if (f > 0 && y == 1 && x == 0) begin
            in_valid = 0; in_flags = '0;
            for (int k = 0; k < 20; k++) read_one(f - 1, k);
            @(negedge clk);
          end
          in_valid = 1;
          l = ($urandom % 11 == 0) ? 255 * ($urandom % 2) : 1 + ($urandom % 4) * 3 + (x / 13) + f;
          in_label = 8'(l);
          in_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
          if (l != 0 && l != 255) begin sx[b][l] += x; sy[b][l] += y; n[b][l]++; end
        end
      @(negedge clk); in_valid = 0; in_flags = '0;
      @(negedge clk);
      for (int k = 0; k < 20; k++) read_one(f, k);
      read_one(f, 255);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
