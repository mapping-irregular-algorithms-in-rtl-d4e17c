// tb_frame_delay: writes three frames of known data and checks that each
// pixel comes out one cycle after the input, carrying the value stored at
// the same position one frame earlier, with the input's flags.
module tb_frame_delay;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0, out_valid;
  rtip_flags_t in_flags = '0, out_flags;
  logic [7:0]  in_data = 0, out_data;
  frame_delay #(.W(8), .X_MAX(16), .Y_MAX(8)) dut (.*);

  localparam int W = 13, H = 7;
  function automatic logic [7:0] val(int f, int x, int y);
    return 8'(f * 61 + x * 7 + y * 17 + 1);
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_data = val(f, x, y);
          in_flags = '{sof: (x == 0 && y == 0), eol: (x == W-1), eof: (x == W-1 && y == H-1)};
          @(negedge clk);
          in_valid = (x % 3 == 1);          // idle cycles between pixels
          if (in_valid) begin in_valid = 0; end
          check(out_valid && out_flags.sof == (x == 0 && y == 0) && out_flags.eol == (x == W-1), "flags");
          if (f > 0) check(out_data == val(f - 1, x, y),
                           $sformatf("f%0d (%0d,%0d) got %0d exp %0d", f, x, y, out_data, val(f-1, x, y)));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
