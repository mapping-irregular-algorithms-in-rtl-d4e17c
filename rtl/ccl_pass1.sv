// ccl_pass1: first pass of the two-pass connected components labeler.
//
// The binary image is scanned left to right, top to bottom, one pixel per
// clock. For every foreground pixel the L-shaped mask looks at the top and
// left neighbours (4-connectivity): no labelled neighbour creates a new
// temporary label, one labelled neighbour or two equal ones pass their
// label on, and two different labels give the smaller one to the pixel and
// record the pair as equivalent. This is the algorithm of the framework's
// labeler. The top neighbours come from a line buffer of X_MAX labels, the
// left neighbour from a register.
//
// Own choices: a pair identical to the last pair recorded in the frame is
// not stored again, which keeps runs of the same conflict from filling the
// table; past MAX_LABEL new blobs reuse label MAX_LABEL and past N_PAIRS
// pairs are dropped, each raising a per-frame overflow flag. The pass also
// tells the equivalence resolver which labels touch the image border
// (needed for the optional border-blob discard) and which labels appear in
// a pair.
//
// Interface: binary pixel stream in; temporary label stream out, one cycle
// later. Pair writes, border marks and the end-of-frame summary (`done`
// with label and pair counts) are registered with the label output.
module ccl_pass1
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX   = 512,
  parameter int unsigned Y_MAX   = 512,
  parameter int unsigned N_PAIRS = 512
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(Y_MAX+1)-1:0]  height,
  input  logic                        in_valid,
  input  rtip_flags_t                 in_flags,
  input  logic                        in_pix,
  output logic                        out_valid,
  output rtip_flags_t                 out_flags,
  output label_t                      out_label,
  // equivalence table write port
  output logic                        pair_we,
  output logic [$clog2(N_PAIRS)-1:0]  pair_idx,
  output label_t                      pair_a,     // larger label
  output label_t                      pair_b,     // smaller label
  // per-label side information
  output logic                        mark_border,
  output label_t                      mark_label,
  // end of frame summary
  output logic                        done,
  output logic [LABEL_W-1:0]          n_labels,
  output logic [$clog2(N_PAIRS+1)-1:0] n_pairs,
  output logic                        label_ovf,
  output logic                        pair_ovf
);
  localparam int XW = $clog2(X_MAX);
  localparam int YW = $clog2(Y_MAX+1);
  localparam int PW = $clog2(N_PAIRS+1);

  label_t          linebuf [X_MAX];
  logic [XW-1:0]   x_cnt;
  logic [YW-1:0]   y_cnt;
  label_t          left_q;
  logic [8:0]      next_q;       // next free label, may reach MAX_LABEL+1
  logic [PW-1:0]   np_q;
  label_t          last_a_q, last_b_q;
  logic            lovf_q, povf_q;

  logic [XW-1:0]   cur_x;
  logic [YW-1:0]   cur_y;
  logic [8:0]      cur_next;
  logic [PW-1:0]   cur_np;
  logic            cur_lovf, cur_povf;
  label_t          top, left, lab;
  logic            new_label, conflict, store_pair;
  label_t          hi, lo;

  always_comb begin
    cur_x    = in_flags.sof ? '0 : x_cnt;
    cur_y    = in_flags.sof ? '0 : y_cnt;
    cur_next = in_flags.sof ? 9'd1 : next_q;
    cur_np   = in_flags.sof ? '0 : np_q;
    cur_lovf = in_flags.sof ? 1'b0 : lovf_q;
    cur_povf = in_flags.sof ? 1'b0 : povf_q;
    top      = (cur_y == '0) ? '0 : linebuf[cur_x];
    left     = (cur_x == '0) ? '0 : left_q;
    hi       = (top > left) ? top : left;
    lo       = (top > left) ? left : top;
    new_label = 1'b0;
    conflict  = 1'b0;
    lab       = '0;
    if (in_pix) begin
      if (hi == '0) begin
        new_label = 1'b1;
        lab = (cur_next > 9'(MAX_LABEL)) ? label_t'(MAX_LABEL) : label_t'(cur_next);
      end else if (lo == '0 || lo == hi) begin
        lab = hi;
      end else begin
        lab = lo;
        conflict = 1'b1;
      end
    end
    store_pair = conflict &&
                 !(cur_np != '0 && last_a_q == hi && last_b_q == lo);
  end

  always_ff @(posedge clk) begin
    if (in_valid) linebuf[cur_x] <= lab;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt <= '0; y_cnt <= '0; left_q <= '0; next_q <= 9'd1; np_q <= '0;
      last_a_q <= '0; last_b_q <= '0; lovf_q <= 1'b0; povf_q <= 1'b0;
      out_valid <= 1'b0; out_flags <= '0; out_label <= '0;
      pair_we <= 1'b0; pair_idx <= '0; pair_a <= '0; pair_b <= '0;
      mark_border <= 1'b0; mark_label <= '0;
      done <= 1'b0; n_labels <= '0; n_pairs <= '0; label_ovf <= 1'b0; pair_ovf <= 1'b0;
    end else begin
      out_valid   <= in_valid;
      out_flags   <= in_valid ? in_flags : '0;
      out_label   <= lab;
      pair_we     <= 1'b0;
      mark_border <= 1'b0;
      done        <= 1'b0;
      if (in_valid) begin
        left_q <= lab;
        if (in_flags.eol) begin
          x_cnt <= '0;
          y_cnt <= cur_y + 1'b1;
        end else begin
          x_cnt <= cur_x + 1'b1;
          y_cnt <= cur_y;
        end
        next_q <= cur_next;
        lovf_q <= cur_lovf;
        if (new_label) begin
          if (cur_next > 9'(MAX_LABEL)) lovf_q <= 1'b1;
          else next_q <= cur_next + 1'b1;
        end
        np_q   <= cur_np;
        povf_q <= cur_povf;
        if (store_pair) begin
          if (cur_np < PW'(N_PAIRS)) begin
            pair_we  <= 1'b1;
            pair_idx <= cur_np[$clog2(N_PAIRS)-1:0];
            pair_a   <= hi;
            pair_b   <= lo;
            np_q     <= cur_np + 1'b1;
            last_a_q <= hi;
            last_b_q <= lo;
          end else begin
            povf_q <= 1'b1;
          end
        end
        if (in_pix && (cur_x == '0 || cur_y == '0 || in_flags.eol ||
                       cur_y == height - 1'b1)) begin
          mark_border <= 1'b1;
          mark_label  <= lab;
        end
        if (in_flags.eof) begin
          done      <= 1'b1;
          n_labels  <= (new_label && cur_next <= 9'(MAX_LABEL)) ? cur_next[7:0]
                                                                : 8'(cur_next - 1'b1);
          n_pairs   <= (store_pair && cur_np < PW'(N_PAIRS)) ? cur_np + 1'b1 : cur_np;
          label_ovf <= cur_lovf || (new_label && cur_next > 9'(MAX_LABEL));
          pair_ovf  <= cur_povf || (store_pair && cur_np >= PW'(N_PAIRS));
        end
      end
    end
  end
endmodule
