// rtip_config_ctrl: the single configuration controller of the framework.
//
// Operators are controlled only by setting their parameters. All settings
// arrive as 32-bit words through one FIFO: operator id in bits 31:24,
// register index in bits 23:16, value in bits 15:0 (this encoding is the
// design's own). The controller takes one word per clock whenever the FIFO
// is not empty and writes the value into the addressed parameter register;
// a word for an unknown operator or register is dropped and `cfg_err`
// pulses. Registers reset to the full frame size, angle 0, threshold 128
// and no border discard. Operators sample their parameters at their own
// start of frame, so a change never splits a frame.
//
// Interface: FIFO read side (first-word fall-through) in, parameter
// registers out; `cfg_wr` pulses for each accepted word.
module rtip_config_ctrl
  import rtip_pkg::*;
#(
  parameter int unsigned X_MAX = 512,
  parameter int unsigned Y_MAX = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fifo_empty,
  input  cfg_word_t   fifo_data,
  output logic        fifo_pop,
  output rtip_cfg_t   cfg,
  output logic        cfg_wr,
  output logic        cfg_err
);
  assign fifo_pop = !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '{width: 16'(X_MAX), height: 16'(Y_MAX), angle: '0, threshold: 8'd128, discard: 1'b0};
      cfg_wr  <= 1'b0;
      cfg_err <= 1'b0;
    end else begin
      cfg_wr  <= 1'b0;
      cfg_err <= 1'b0;
      if (!fifo_empty) begin
        cfg_wr <= 1'b1;
        unique case ({fifo_data.op, fifo_data.addr})
          {OP_FRAME, 8'd0}:  cfg.width     <= (fifo_data.value > 16'(X_MAX)) ? 16'(X_MAX) : fifo_data.value;
          {OP_FRAME, 8'd1}:  cfg.height    <= (fifo_data.value > 16'(Y_MAX)) ? 16'(Y_MAX) : fifo_data.value;
          {OP_ROTATE, 8'd0}: cfg.angle     <= fifo_data.value;
          {OP_BIN, 8'd0}:    cfg.threshold <= fifo_data.value[7:0];
          {OP_CCL, 8'd0}:    cfg.discard   <= fifo_data.value[0];
          default: begin
            cfg_wr  <= 1'b0;
            cfg_err <= 1'b1;
          end
        endcase
      end
    end
  end
endmodule
