// ccl_equiv_resolve: equivalence table and equivalence resolution of the
// connected components labeler.
//
// The first pass writes up to N_PAIRS pairs of equivalent temporary labels
// into a plain memory (no content-addressable memory). After the pass, a
// depth-first search over that table groups the temporary labels into
// equivalence classes: temporary labels are visited in increasing order;
// an unvisited label becomes the root of a new class and is pushed on a
// stack; each label popped from the stack causes one full scan of the pair
// table, and every unvisited label found paired with it joins the class and
// is pushed. A class therefore gets the smallest temporary label among its
// members as its final label, which keeps final labels within 1..254.
// The result is the final label table read by the second pass, plus one
// bit per class telling whether any member touches the image border.
//
// Timing: one table entry is scanned per cycle, one cycle per pop, one per
// label visited. Labels that never appear in a pair are recognised from a
// bit set by the first pass and cost one cycle. The worst case is thus
// about n_labels*(n_pairs+1) cycles, below the bound N*(N-1) of the
// original design for the default N = 512 pairs and 254 labels.
// A `new_frame` while the search is running means on-the-fly processing
// has failed: the search is abandoned and `overrun` pulses.
module ccl_equiv_resolve
  import rtip_pkg::*;
#(
  parameter int unsigned N_PAIRS = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // from the first pass
  input  logic                         new_frame,   // first pass starts a frame
  input  logic                         pair_we,
  input  logic [$clog2(N_PAIRS)-1:0]   pair_idx,
  input  label_t                       pair_a,
  input  label_t                       pair_b,
  input  logic                         mark_border,
  input  label_t                       mark_label,
  input  logic                         start,
  input  logic [LABEL_W-1:0]           n_labels,
  input  logic [$clog2(N_PAIRS+1)-1:0] n_pairs,
  // lookup port of the second pass
  input  label_t                       lk_label,
  output label_t                       lk_final,
  output logic                         lk_border,
  // status
  output logic                         busy,
  output logic                         done,
  output logic                         overrun,
  output logic [31:0]                  cycles
);
  localparam int PW = $clog2(N_PAIRS+1);
  localparam int IW = $clog2(N_PAIRS);

  typedef enum logic [1:0] {IDLE, NEXT, POP, SCAN} state_t;
  state_t state;

  label_t        pa [N_PAIRS];
  label_t        pb [N_PAIRS];
  label_t        lut [256];
  label_t        stack [256];
  logic [255:0]  in_pair, border, assigned, cls_border;
  logic [8:0]    sp;
  label_t        root, cur, nlab;
  logic [PW-1:0] npairs;
  logic [IW-1:0] idx;
  label_t        other;

  assign busy      = (state != IDLE);
  assign lk_final  = lut[lk_label];
  assign lk_border = cls_border[lut[lk_label]];

  always_comb begin
    other = '0;
    if (pa[idx] == cur)      other = pb[idx];
    else if (pb[idx] == cur) other = pa[idx];
  end

  always_ff @(posedge clk) begin
    if (pair_we) begin
      pa[pair_idx] <= pair_a;
      pb[pair_idx] <= pair_b;
    end
    case (state)
      NEXT: if (!assigned[root]) lut[root] <= root;
      SCAN: if (other != '0 && !assigned[other]) lut[other] <= root;
      default: ;
    endcase
    if (state == NEXT && !assigned[root] && in_pair[root]) stack[0] <= root;
    if (state == SCAN && other != '0 && !assigned[other]) stack[sp[7:0]] <= other;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; in_pair <= '0; border <= '0; assigned <= '0; cls_border <= '0;
      sp <= '0; root <= '0; cur <= '0; nlab <= '0; npairs <= '0; idx <= '0;
      done <= 1'b0; overrun <= 1'b0; cycles <= '0;
    end else begin
      done    <= 1'b0;
      overrun <= 1'b0;
      if (new_frame) begin
        in_pair <= '0;
        border  <= '0;
      end
      if (pair_we) begin
        in_pair[pair_a] <= 1'b1;
        in_pair[pair_b] <= 1'b1;
      end
      if (mark_border) border[mark_label] <= 1'b1;
      if (state != IDLE) cycles <= cycles + 1'b1;
      case (state)
        IDLE: if (start) begin
          state    <= NEXT;
          root     <= 8'd1;
          nlab     <= n_labels;
          npairs   <= n_pairs;
          assigned <= '0;
          cycles   <= '0;
        end
        NEXT: begin
          if (root > nlab || root == '0) begin
            state <= IDLE;
            done  <= 1'b1;
          end else if (assigned[root]) begin
            root <= root + 1'b1;
          end else begin
            assigned[root]   <= 1'b1;
            cls_border[root] <= border[root];
            if (in_pair[root] && npairs != '0) begin
              sp    <= 9'd1;
              state <= POP;
            end else begin
              root <= root + 1'b1;
            end
          end
        end
        POP: begin
          if (sp == '0) begin
            root  <= root + 1'b1;
            state <= NEXT;
          end else begin
            cur   <= stack[sp[7:0] - 1'b1];
            sp    <= sp - 1'b1;
            idx   <= '0;
            state <= SCAN;
          end
        end
        SCAN: begin
          if (other != '0 && !assigned[other]) begin
            assigned[other] <= 1'b1;
            if (border[other]) cls_border[root] <= 1'b1;
            sp <= sp + 1'b1;
          end
          if (PW'(idx) == npairs - 1'b1) state <= POP;
          else idx <= idx + 1'b1;
        end
        default: state <= IDLE;
      endcase
      if (new_frame && state != IDLE) begin
        state   <= IDLE;
        overrun <= 1'b1;
      end
    end
  end
endmodule
