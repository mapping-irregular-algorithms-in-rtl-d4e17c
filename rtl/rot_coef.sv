// rot_coef: turns the rotation angle of the rotation core into the six
// inverse-mapping coefficients used by the warper.
//
// The angle is a 16-bit binary angle (65536 = one full turn). An iterative
// CORDIC in rotation mode computes cos and sin: the angle is first folded
// into [-90, +90] degrees (adding half a turn and negating the result when
// needed), then ITER micro-rotations by atan(2^-i) bring the residual
// angle to zero, starting from the vector (K, 0) with K the CORDIC gain
// compensation 0.6072529. Internally x and y carry 30 fraction bits and
// the angle 24 bits (ATAN[i] = round(atan(2^-i) * 2^24 / (2*pi))). The
// rotation is about the image centre (cx, cy) = ((width-1)/2, (height-1)/2):
//   u =  c*(x-cx) + s*(y-cy) + cx,   v = -s*(x-cx) + c*(y-cy) + cy.
// The unit runs continuously, restarting after each result, so `coef`
// follows a new angle or image size within two runs (2*(ITER+2) cycles).
// Using CORDIC, the centre and the unit's timing are this design's
// choices: the framework only shows a rotation core with an angle input.
module rot_coef
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [15:0]                angle,
  input  logic [$clog2(X_MAX+1)-1:0] width,
  input  logic [$clog2(Y_MAX+1)-1:0] height,
  output affine_t                    coef,
  output logic                       coef_valid
);
  localparam int unsigned ITER = 18;
  localparam logic signed [31:0] K30 = 32'sd652032874;   // 0.6072529 * 2^30
  localparam logic signed [24:0] ATAN [ITER] = '{
    25'sd2097152, 25'sd1238021, 25'sd654136, 25'sd332050, 25'sd166669, 25'sd83416,
    25'sd41718,   25'sd20860,   25'sd10430,  25'sd5215,   25'sd2608,   25'sd1304,
    25'sd652,     25'sd326,     25'sd163,    25'sd81,     25'sd41,     25'sd20};

  typedef enum logic [1:0] {LOAD, ROTATE, FINISH} state_t;
  state_t state;

  logic signed [31:0] x, y;
  logic signed [24:0] z;
  logic               neg;
  logic [4:0]         i;
  logic [15:0]        a_fold;
  fix_t               c, s, cx, cy;
  logic signed [63:0] p_ccx, p_scy, p_scx, p_ccy;

  // fold into [-90, 90] degrees
  always_comb begin
    if (angle >= 16'd16384 && angle < 16'd49152) a_fold = angle - 16'd32768;
    else                                        a_fold = angle;
  end

  // results in Q16 with rounding
  assign c  = neg ? -((x + 32'sd8192) >>> 14) : ((x + 32'sd8192) >>> 14);
  assign s  = neg ? -((y + 32'sd8192) >>> 14) : ((y + 32'sd8192) >>> 14);
  assign cx = (fix_t'(width)  - 1) <<< (FRAC - 1);
  assign cy = (fix_t'(height) - 1) <<< (FRAC - 1);
  assign p_ccx = 64'(c) * 64'(cx);
  assign p_scy = 64'(s) * 64'(cy);
  assign p_scx = 64'(s) * 64'(cx);
  assign p_ccy = 64'(c) * 64'(cy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD; x <= '0; y <= '0; z <= '0; neg <= 1'b0; i <= '0;
      coef <= '0; coef_valid <= 1'b0;
    end else begin
      case (state)
        LOAD: begin
          x     <= K30;
          y     <= '0;
          z     <= 25'(signed'(a_fold)) <<< 8;
          neg   <= (a_fold != angle);
          i     <= '0;
          state <= ROTATE;
        end
        ROTATE: begin
          if (z >= 0) begin
            x <= x - (y >>> i);
            y <= y + (x >>> i);
            z <= z - ATAN[i];
          end else begin
            x <= x + (y >>> i);
            y <= y - (x >>> i);
            z <= z + ATAN[i];
          end
          i <= i + 1'b1;
          if (i == 5'(ITER - 1)) state <= FINISH;
        end
        FINISH: begin
          coef.ux    <= c;
          coef.uy    <= s;
          coef.u0    <= cx - fix_t'(p_ccx >>> FRAC) - fix_t'(p_scy >>> FRAC);
          coef.vx    <= -s;
          coef.vy    <= c;
          coef.v0    <= cy + fix_t'(p_scx >>> FRAC) - fix_t'(p_ccy >>> FRAC);
          coef_valid <= 1'b1;
          state      <= LOAD;
        end
        default: state <= LOAD;
      endcase
    end
  end
endmodule
