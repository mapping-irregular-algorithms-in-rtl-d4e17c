// tb_rot_coef: sets angles in all four quadrants (including 0, 90, 180
// and 270 degrees) and compares the six coefficients with cos/sin
// evaluated in floating point: cos and sin within 4/65536, the offsets
// within 1/64 pixel. Also checks that a new result appears within
// 2*(ITER+2) cycles of an angle change.
module tb_rot_coef;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] angle = 0;
  logic [9:0]  width = 0, height = 0;
  affine_t     coef;
  logic        coef_valid;
  rot_coef #(.X_MAX(512), .Y_MAX(512)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real th, c, s, cx, cy, k;
    k = 65536.0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      case (n)
        0: angle = 0; 1: angle = 16384; 2: angle = 32768; 3: angle = 49152;
        4: angle = 16383; 5: angle = 49151; 6: angle = 65535;
        default: angle = 16'($urandom);
      endcase
      width = 10'(16 + $urandom % 497); height = 10'(16 + $urandom % 497);
      repeat (2 * (18 + 2) + 1) @(negedge clk);
      th = 2.0 * 3.14159265358979 * angle / 65536.0;
      c = $cos(th); s = $sin(th);
      cx = (width - 1) / 2.0; cy = (height - 1) / 2.0;
      check(coef_valid, "valid");
      check(near(coef.ux / k, c, 4.0 / k) && near(coef.vy / k, c, 4.0 / k),
            $sformatf("angle %0d cos %f got %f", angle, c, coef.ux / k));
      check(near(coef.uy / k, s, 4.0 / k) && near(coef.vx / k, -s, 4.0 / k),
            $sformatf("angle %0d sin %f got %f", angle, s, coef.uy / k));
      check(near(coef.u0 / k, cx - c * cx - s * cy, 1.0 / 64) &&
            near(coef.v0 / k, cy + s * cx - c * cy, 1.0 / 64),
            $sformatf("angle %0d offsets %f %f", angle, coef.u0 / k, coef.v0 / k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
