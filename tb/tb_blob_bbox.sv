// tb_blob_bbox: streams random label frames and reads every label's
// bounding box after each frame and again during the next frame, against
// boxes computed in the testbench. Labels 0 and 255 must read as absent.
module tb_blob_bbox;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0, frame_done, rd_found;
  rtip_flags_t in_flags = '0;
  label_t      in_label = 0, rd_label = 0;
  logic [5:0]  rd_xmin, rd_xmax, rd_ymin, rd_ymax;
  blob_bbox #(.X_MAX(64), .Y_MAX(64)) dut (.*);

  localparam int W = 30, H = 12;
  int bx0 [2][256], bx1 [2][256], by0 [2][256], by1 [2][256];
  bit found [2][256];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic read_all(int f);
    int b;
    b = f % 2;
    for (int l = 0; l < 256; l++) begin
      rd_label = 8'(l); #1;
      check(rd_found == found[b][l], $sformatf("frame %0d label %0d found", f, l));
      if (found[b][l])
        check(rd_xmin == 6'(bx0[b][l]) && rd_xmax == 6'(bx1[b][l]) &&
              rd_ymin == 6'(by0[b][l]) && rd_ymax == 6'(by1[b][l]),
              $sformatf("frame %0d label %0d box %0d..%0d x %0d..%0d", f, l, rd_xmin, rd_xmax, rd_ymin, rd_ymax));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int b, l;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      b = f % 2;
      for (int i = 0; i < 256; i++) found[b][i] = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          if (f > 0 && y == 3 && x == 0) begin
            in_valid = 0; in_flags = '0;
            read_all(f - 1);
            @(negedge clk);
          end
          in_valid = 1;
          // blobs: label depends on a coarse grid cell, plus noise
          l = ($urandom % 9 == 0) ? 255 * ($urandom % 2) : 1 + (x / 7) + 5 * (y / 5) + f;
          in_label = 8'(l);
          in_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
          if (l != 0 && l != 255) begin
            if (!found[b][l]) begin
              found[b][l] = 1; bx0[b][l] = x; bx1[b][l] = x; by0[b][l] = y; by1[b][l] = y;
            end else begin
              if (x < bx0[b][l]) bx0[b][l] = x;
              if (x > bx1[b][l]) bx1[b][l] = x;
              if (y < by0[b][l]) by0[b][l] = y;
              if (y > by1[b][l]) by1[b][l] = y;
            end
          end
        end
      @(negedge clk); in_valid = 0; in_flags = '0;
      @(negedge clk);
      read_all(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
