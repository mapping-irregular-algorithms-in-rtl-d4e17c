// tb_rtip_config_ctrl: pushes configuration words into the FIFO in front
// of the controller (in bursts that fill it) and checks the reset values,
// each parameter register after its write, clamping of the frame size,
// the error pulse for unknown targets and that every word is consumed in
// order, one per clock.
module tb_rtip_config_ctrl;
  import rtip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      wr_en = 0, full, empty, fifo_pop, cfg_wr, cfg_err;
  cfg_word_t wr_data = '0, rd_data;
  rtip_cfg_t cfg;
  int n_wr = 0, n_err = 0;

  rtip_sync_fifo #(.W(32), .DEPTH(16)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data, .full, .rd_en(fifo_pop), .rd_data, .empty);
  rtip_config_ctrl #(.X_MAX(512), .Y_MAX(512)) dut (
    .clk, .rst_n, .fifo_empty(empty), .fifo_data(rd_data), .fifo_pop, .cfg, .cfg_wr, .cfg_err);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cfg_wr) n_wr++;
    if (cfg_err) n_err++;
  end

  task automatic push(logic [7:0] op, logic [7:0] addr, logic [15:0] value);
    @(negedge clk); wr_en = 1; wr_data = '{op: op, addr: addr, value: value};
    @(negedge clk); wr_en = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(cfg.width == 512 && cfg.height == 512 && cfg.angle == 0 && cfg.threshold == 128 && !cfg.discard,
          "reset values");
    push(OP_FRAME, 0, 320);   check(cfg.width == 320, "width");
    push(OP_FRAME, 1, 240);   check(cfg.height == 240, "height");
    push(OP_FRAME, 0, 1000);  check(cfg.width == 512, "width clamped");
    push(OP_ROTATE, 0, 8192); check(cfg.angle == 8192, "angle");
    push(OP_BIN, 0, 77);      check(cfg.threshold == 77, "threshold");
    push(OP_CCL, 0, 1);       check(cfg.discard, "discard");
    push(OP_CCL, 5, 0);       check(cfg.discard && n_err == 1, "unknown register dropped");
    push(8'd9, 0, 0);         check(n_err == 2, "unknown operator dropped");
    check(n_wr == 6, $sformatf("accepted writes %0d", n_wr));
    // burst: threshold 0..19, the controller drains one per clock, last wins
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); wr_en = 1; wr_data = '{op: OP_BIN, addr: 0, value: 16'(i)};
    end
    @(negedge clk); wr_en = 0;
    repeat (3) @(negedge clk);
    check(cfg.threshold == 19 && empty, "burst drained in order");
    check(n_wr == 26, $sformatf("burst accepted %0d", n_wr - 6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
