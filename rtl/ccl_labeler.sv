// ccl_labeler: one connected components labeler, built as a cascade of
// framework operators: first pass -> frame delay -> second pass, with the
// equivalence resolver beside them on custom connections.
//
// A frame fed to the labeler is labelled temporarily by the first pass and
// stored in the frame delay; after its last pixel the resolver groups the
// temporary labels. The final labels of that frame come out while the
// *next* frame fed to this labeler streams in: the frame delay returns the
// stored temporary labels pixel by pixel and the second pass translates
// them. Resolution must end before that next frame starts, otherwise
// `overrun` pulses and the frame is labelled with an incomplete table.
// The output is suppressed until a first frame has been resolved. The
// border-discard option is sampled at the start of each input frame and
// travels with that frame to the second pass.
//
// Interface: binary pixel stream in, label stream out with LATENCY = 3
// cycles relative to the input pixel that carries it (its flags are those
// of the input frame). The geometry of consecutive frames is assumed equal.
module ccl_labeler
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
  output logic                        res_busy,
  output logic                        res_done,
  output logic [31:0]                 res_cycles,
  output logic                        overrun,
  output logic                        label_ovf,
  output logic                        pair_ovf
);
  localparam int PW = $clog2(N_PAIRS+1);

  logic                        p1_valid;
  rtip_flags_t                 p1_flags;
  label_t                      p1_label;
  logic                        pair_we;
  logic [$clog2(N_PAIRS)-1:0]  pair_idx;
  label_t                      pair_a, pair_b;
  logic                        mark_border;
  label_t                      mark_label;
  logic                        p1_done;
  logic [LABEL_W-1:0]          p1_nlab, nlab_q;
  logic [PW-1:0]               p1_npairs, npairs_q;
  logic                        p1_lovf, p1_povf;

  logic                        fd_valid;
  rtip_flags_t                 fd_flags;
  label_t                      fd_label;

  label_t                      lk_label, lk_final;
  logic                        lk_border;
  logic                        p2_valid;
  rtip_flags_t                 p2_flags;
  label_t                      p2_label;
  logic                        have_prev;
  logic                        disc_in_q, disc_frame_q;   // discard option of the frame in pass 1 / in pass 2

  ccl_pass1 #(.X_MAX(X_MAX), .Y_MAX(Y_MAX), .N_PAIRS(N_PAIRS)) u_pass1 (
    .clk, .rst_n, .height,
    .in_valid, .in_flags, .in_pix,
    .out_valid(p1_valid), .out_flags(p1_flags), .out_label(p1_label),
    .pair_we, .pair_idx, .pair_a, .pair_b, .mark_border, .mark_label,
    .done(p1_done), .n_labels(p1_nlab), .n_pairs(p1_npairs),
    .label_ovf(p1_lovf), .pair_ovf(p1_povf)
  );

  frame_delay #(.W(LABEL_W), .X_MAX(X_MAX), .Y_MAX(Y_MAX)) u_delay (
    .clk, .rst_n,
    .in_valid(p1_valid), .in_flags(p1_flags), .in_data(p1_label),
    .out_valid(fd_valid), .out_flags(fd_flags), .out_data(fd_label)
  );

  ccl_equiv_resolve #(.N_PAIRS(N_PAIRS)) u_resolve (
    .clk, .rst_n,
    .new_frame(p1_valid && p1_flags.sof),
    .pair_we, .pair_idx, .pair_a, .pair_b, .mark_border, .mark_label,
    .start(p2_valid && p2_flags.eof), .n_labels(nlab_q), .n_pairs(npairs_q),
    .lk_label, .lk_final, .lk_border,
    .busy(res_busy), .done(res_done), .overrun, .cycles(res_cycles)
  );

  ccl_pass2 u_pass2 (
    .clk, .rst_n, .discard_border(disc_frame_q),
    .in_valid(fd_valid), .in_flags(fd_flags), .in_label(fd_label),
    .lk_label, .lk_final, .lk_border,
    .out_valid(p2_valid), .out_flags(p2_flags), .out_label(p2_label)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nlab_q <= '0; npairs_q <= '0; label_ovf <= 1'b0; pair_ovf <= 1'b0; have_prev <= 1'b0;
      disc_in_q <= 1'b0; disc_frame_q <= 1'b0;
    end else begin
      if (in_valid && in_flags.sof) disc_in_q <= discard_border;
      label_ovf <= 1'b0;
      pair_ovf  <= 1'b0;
      if (p1_done) begin
        nlab_q    <= p1_nlab;
        npairs_q  <= p1_npairs;
        label_ovf <= p1_lovf;
        pair_ovf  <= p1_povf;
        disc_frame_q <= disc_in_q;
      end
      // output of the current frame is valid once a frame has been resolved
      if (p2_valid && p2_flags.eof) have_prev <= 1'b1;
    end
  end

  assign out_valid = p2_valid && have_prev;
  assign out_flags = out_valid ? p2_flags : '0;
  assign out_label = p2_label;
endmodule
