// tb_ccl_pass2: feeds random temporary labels through the second pass with
// a final label table modelled in the testbench, and checks the one-cycle
// latency, the translation, background passing as 0 and the reserved label
// 255 for border classes when discard is on (the option is sampled at the
// start of a frame).
module tb_ccl_pass2;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        discard_border = 0, in_valid = 0;
  rtip_flags_t in_flags = '0;
  label_t      in_label = 0, lk_label, lk_final, out_label;
  logic        lk_border, out_valid;
  rtip_flags_t out_flags;

  ccl_pass2 dut (.*);

  label_t table_fin [256];
  bit     table_brd [256];
  assign lk_final  = table_fin[lk_label];
  assign lk_border = table_brd[lk_label];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    label_t exp_l;
    bit disc;
    for (int l = 0; l < 256; l++) begin
      table_fin[l] = 8'(1 + $urandom % 254); table_brd[l] = ($urandom % 3 == 0);
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      disc = f[0];
      for (int i = 0; i < 500; i++) begin
        @(negedge clk);
        // the option may change in mid-frame; only its value at sof counts
        discard_border = (i == 0) ? disc : 1'($urandom);
        in_valid = 1;
        in_label = ($urandom % 4 == 0) ? 8'd0 : 8'($urandom % 255);
        in_flags = '{sof: (i == 0), eol: (i % 25 == 24), eof: (i == 499)};
        exp_l = (in_label == 0) ? 8'd0 : (disc && table_brd[in_label]) ? 8'd255 : table_fin[in_label];
        @(posedge clk); #1;
        check(out_valid && out_label == exp_l && out_flags == in_flags,
              $sformatf("label %0d -> %0d exp %0d", in_label, out_label, exp_l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
