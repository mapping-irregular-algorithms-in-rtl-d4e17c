// tb_blob_area: streams random label frames and reads every label's area
// after each frame, once while the following frame is already streaming
// in (checks the bank swap), comparing with counts made in the testbench.
// Labels 0 and 255 must read as 0.
module tb_blob_area;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0, frame_done;
  rtip_flags_t in_flags = '0;
  label_t      in_label = 0, rd_label = 0;
  logic [12:0] rd_area;
  blob_area #(.X_MAX(64), .Y_MAX(64)) dut (.*);

  localparam int W = 24, H = 10;
  int ref_area [2][256];
  int n_done = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always @(posedge clk) if (rst_n && frame_done) n_done++;

  task automatic read_all(int f);
    for (int l = 0; l < 256; l++) begin
      rd_label = 8'(l); #1;
      check(32'(rd_area) == ((l == 0 || l == 255) ? 0 : ref_area[f % 2][l]),
            $sformatf("frame %0d label %0d area %0d exp %0d", f, l, rd_area, ref_area[f % 2][l]));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      for (int l = 0; l < 256; l++) ref_area[f % 2][l] = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          if (f > 0 && y == 2 && x == 0) begin
            in_valid = 0; in_flags = '0;
            read_all(f - 1);           // previous frame, read during this one
            @(negedge clk);
          end
          in_valid = 1;
          in_label = ($urandom % 5 == 0) ? 8'(255 * ($urandom % 2)) : 8'(1 + $urandom % (3 + 60 * f[0]));
          in_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
          ref_area[f % 2][in_label]++;
        end
      @(negedge clk); in_valid = 0; in_flags = '0;
      @(negedge clk);
      check(n_done == f + 1, "frame_done pulses");
      read_all(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
