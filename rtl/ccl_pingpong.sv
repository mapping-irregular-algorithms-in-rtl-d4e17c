// ccl_pingpong: on-the-fly connected components labeler.
//
// One labeler cannot resolve equivalences while the next frame streams in,
// so two labelers work in alternation: a switch sends images 1, 3, 5, ...
// to the odd labeler and 2, 4, 6, ... to the even labeler, and a mux
// collects the labelled images. Each labeler emits the final labels of its
// previous image while it receives its next one, so labelled image n leaves
// while image n+2 enters, and each labeler has one full image period to
// resolve equivalences (a labeler reports `overrun` otherwise). The switch
// toggles on every start of frame; the mux follows the same even/odd
// select, delayed by the labeler latency.
//
// Interface: binary pixel stream in; label stream out, LATENCY = 3 cycles
// after the input pixel it travels with, two images behind the input.
// The reset also disables the output assertion (`disable iff`), which lint
// reports as a reset used both synchronously and asynchronously; all flops
// use it asynchronously only.
module ccl_pingpong
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX   = 512,
  parameter int unsigned Y_MAX   = 512,
  parameter int unsigned N_PAIRS = 512
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(Y_MAX+1)-1:0]  height,
  input  logic                        discard_border,
  input  logic                        in_valid,
  input  rtip_flags_t                 in_flags,
  input  logic                        in_pix,
  output logic                        out_valid,
  output rtip_flags_t                 out_flags,
  output label_t                      out_label,
  output logic [1:0]                  res_done,     // [0] odd, [1] even labeler
  output logic [1:0]                  res_busy,
  output logic [31:0]                 res_cycles_odd,
  output logic [31:0]                 res_cycles_even,
  output logic                        overrun,
  output logic                        label_ovf,
  output logic                        pair_ovf
);
  localparam int unsigned LATENCY = 3;

  logic       sel_q, sel;           // 0: odd labeler, 1: even labeler
  logic [LATENCY-1:0] sel_pipe;
  logic       o_valid, e_valid;
  rtip_flags_t o_flags, e_flags;
  label_t     o_label, e_label;
  logic [1:0] ovr, lovf, povf;

  // switch
  assign sel = (in_valid && in_flags.sof) ? ~sel_q : sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q    <= 1'b1;          // first image goes to the odd labeler
      sel_pipe <= '0;
    end else begin
      sel_q    <= sel;
      sel_pipe <= {sel_pipe[LATENCY-2:0], sel};
    end
  end

  ccl_labeler #(.X_MAX(X_MAX), .Y_MAX(Y_MAX), .N_PAIRS(N_PAIRS)) u_odd (
    .clk, .rst_n, .height, .discard_border,
    .in_valid(in_valid && !sel), .in_flags, .in_pix,
    .out_valid(o_valid), .out_flags(o_flags), .out_label(o_label),
    .res_busy(res_busy[0]), .res_done(res_done[0]), .res_cycles(res_cycles_odd),
    .overrun(ovr[0]), .label_ovf(lovf[0]), .pair_ovf(povf[0])
  );

  ccl_labeler #(.X_MAX(X_MAX), .Y_MAX(Y_MAX), .N_PAIRS(N_PAIRS)) u_even (
    .clk, .rst_n, .height, .discard_border,
    .in_valid(in_valid && sel), .in_flags, .in_pix,
    .out_valid(e_valid), .out_flags(e_flags), .out_label(e_label),
    .res_busy(res_busy[1]), .res_done(res_done[1]), .res_cycles(res_cycles_even),
    .overrun(ovr[1]), .label_ovf(lovf[1]), .pair_ovf(povf[1])
  );

  // mux
  always_comb begin
    if (sel_pipe[LATENCY-1]) begin
      out_valid = e_valid; out_flags = e_flags; out_label = e_label;
    end else begin
      out_valid = o_valid; out_flags = o_flags; out_label = o_label;
    end
  end

  assign overrun   = |ovr;
  assign label_ovf = |lovf;
  assign pair_ovf  = |povf;

  // the two labelers never output at the same time
  assert property (@(posedge clk) disable iff (!rst_n) !(o_valid && e_valid));
endmodule
