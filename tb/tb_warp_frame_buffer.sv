// tb_warp_frame_buffer: fills the buffer with a position-dependent pattern
// and reads it back at random positions, checking the one-cycle read
// latency and that writes to one position leave the others alone.
module tb_warp_frame_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       wr_en = 0, rd_en = 0;
  logic [4:0] wr_x = 0, rd_x = 0;
  logic [3:0] wr_y = 0, rd_y = 0;
  logic [7:0] wr_data = 0, rd_data;
  warp_frame_buffer #(.PW(8), .X_MAX(32), .Y_MAX(16)) dut (.*);

  function automatic logic [7:0] pat(int x, int y, int k);
    return 8'(x * 5 + y * 33 + k * 101);
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int x, y;
    for (int k = 0; k < 2; k++) begin
      for (int yy = 0; yy < 16; yy++)
        for (int xx = 0; xx < 32; xx++) begin
          @(negedge clk); wr_en = 1; wr_x = 5'(xx); wr_y = 4'(yy); wr_data = pat(xx, yy, k);
        end
      @(negedge clk); wr_en = 0;
      for (int n = 0; n < 600; n++) begin
        x = $urandom % 32; y = $urandom % 16;
        @(negedge clk); rd_en = 1; rd_x = 5'(x); rd_y = 4'(y);
        @(negedge clk); rd_en = 0;
        check(rd_data == pat(x, y, k), $sformatf("(%0d,%0d) got %0d exp %0d", x, y, rd_data, pat(x, y, k)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
