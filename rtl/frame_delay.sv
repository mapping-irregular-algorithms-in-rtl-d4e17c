// frame_delay: frame delay operator of the framework library, used by the
// labeler to hold the image of temporary labels.
//
// A memory of X_MAX*Y_MAX words is addressed in raster order. On every
// valid input pixel the word stored at the pixel's address is read out and
// the new value written in its place, so the output is the pixel at the
// same position in the previous frame that went through this operator,
// however long ago that frame was. The address restarts at every start of
// frame; lines are packed with a stride of X_MAX.
//
// Interface: uniform stream in and out, one cycle of latency; the output
// flags are those of the input (the geometry of the current frame).
module frame_delay
  import rtip_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  rtip_flags_t  in_flags,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output rtip_flags_t  out_flags,
  output logic [W-1:0] out_data
);
  localparam int unsigned DEPTH = X_MAX * Y_MAX;
  localparam int AW = $clog2(DEPTH);
  localparam int XW = $clog2(X_MAX);
  localparam int YW = $clog2(Y_MAX);

  logic [W-1:0]  mem [DEPTH];
  logic [XW-1:0] x_cnt, cur_x;
  logic [YW-1:0] y_cnt, cur_y;
  logic [AW-1:0] addr;

  always_comb begin
    cur_x = in_flags.sof ? '0 : x_cnt;
    cur_y = in_flags.sof ? '0 : y_cnt;
    addr  = AW'(cur_y) * AW'(X_MAX) + AW'(cur_x);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_data  <= mem[addr];
      mem[addr] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt <= '0; y_cnt <= '0; out_valid <= 1'b0; out_flags <= '0;
    end else begin
      out_valid <= in_valid;
      out_flags <= in_valid ? in_flags : '0;
      if (in_valid) begin
        x_cnt <= in_flags.eol ? '0 : cur_x + 1'b1;
        y_cnt <= in_flags.eol ? cur_y + 1'b1 : cur_y;
      end
    end
  end
endmodule
