// tb_ccl_equiv_resolve: loads random equivalence tables, runs the search
// and reads back the final label of every temporary label; the expected
// value is the smallest label of its class, found here by repeated
// relaxation over the pairs. Border flags are checked per class. Also
// checks the cycle count formula for a chain of pairs and that a new frame
// arriving during the search is reported as an overrun.
module tb_ccl_equiv_resolve;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        new_frame = 0, pair_we = 0, mark_border = 0, start = 0;
  logic [8:0]  pair_idx = 0;
  label_t      pair_a = 0, pair_b = 0, mark_label = 0, lk_label = 0, lk_final;
  logic [7:0]  n_labels = 0;
  logic [9:0]  n_pairs = 0;
  logic        lk_border, busy, done, overrun;
  logic [31:0] cycles;
  int          n_overrun = 0;

  ccl_equiv_resolve #(.N_PAIRS(512)) dut (.*);

  int cls [256];
  bit brd [256];
  int ta [512], tbb [512];   // copy of the table written

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && overrun) n_overrun++;

  task automatic load(int nl, int np, int mode);
    int a, b;
    bit changed;
    @(negedge clk); new_frame = 1; @(negedge clk); new_frame = 0;
    for (int l = 0; l < 256; l++) begin cls[l] = l; brd[l] = 0; end
    for (int i = 0; i < np; i++) begin
      if (mode == 1) begin a = i + 2; b = i + 1; end              // chain
      else begin
        a = 2 + $urandom % (nl - 1); b = 1 + $urandom % (a - 1);
      end
      @(negedge clk); pair_we = 1; pair_idx = 9'(i); pair_a = 8'(a); pair_b = 8'(b);
      ta[i] = a; tbb[i] = b;
      if (cls[a] > cls[b]) cls[a] = cls[b]; // seed, relaxation below
    end
    @(negedge clk); pair_we = 0;
    for (int l = 1; l <= nl; l++)
      if ($urandom % 7 == 0) begin
        @(negedge clk); mark_border = 1; mark_label = 8'(l); brd[l] = 1;
      end
    @(negedge clk); mark_border = 0;
    // relaxation to the class minimum
    do begin
      changed = 0;
      for (int i = 0; i < np; i++) begin
        a = ta[i]; b = tbb[i];
        if (cls[a] < cls[b]) begin cls[b] = cls[a]; changed = 1; end
        if (cls[b] < cls[a]) begin cls[a] = cls[b]; changed = 1; end
      end
    end while (changed);
    n_labels = 8'(nl); n_pairs = 10'(np);
  endtask

  task automatic run_and_check(int nl, int np);
    bit cb [256];
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(cycles <= 32'(nl * (np + 2) + 2), $sformatf("cycles %0d", cycles));
    for (int l = 0; l < 256; l++) cb[l] = 0;
    for (int l = 1; l <= nl; l++) if (brd[l]) cb[cls[l]] = 1;
    for (int l = 1; l <= nl; l++) begin
      lk_label = 8'(l); #1;
      check(lk_final == 8'(cls[l]), $sformatf("label %0d -> %0d exp %0d", l, lk_final, cls[l]));
      check(lk_border == cb[cls[l]], $sformatf("border of %0d", l));
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // example table {3-2, 4-3} with 5 labels
    load(5, 0, 0);
    @(negedge clk); pair_we = 1; pair_idx = 0; pair_a = 3; pair_b = 2;
    @(negedge clk); pair_idx = 1; pair_a = 4; pair_b = 3;
    @(negedge clk); pair_we = 0;
    cls[3] = 2; cls[4] = 2; n_pairs = 2;
    run_and_check(5, 2);
    for (int k = 0; k < 8; k++) begin
      int nl, np;
      nl = 2 + $urandom % 253; np = $urandom % 200;
      load(nl, np, 0);
      run_and_check(nl, np);
    end
    // full table, most labels in pairs
    load(254, 512, 0); run_and_check(254, 512);
    // chain 1-2-...-60: every label is popped once, each pop scans 59 pairs
    load(60, 59, 1);
    run_and_check(60, 59);
    check(cycles == 1 + 60 * (59 + 1) + 1 + 59 + 1, $sformatf("chain cycles %0d", cycles));
    // overrun: a new frame during the search
    load(200, 300, 0);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (50) @(negedge clk);
    check(busy, "busy during search");
    @(negedge clk); new_frame = 1; @(negedge clk); new_frame = 0;
    @(negedge clk);
    check(!busy && n_overrun == 1, $sformatf("overrun reported (%0d) and search abandoned (busy %0d)", n_overrun, busy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
