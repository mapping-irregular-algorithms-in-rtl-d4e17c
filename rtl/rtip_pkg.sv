// rtip_pkg: types and constants shared by the real-time image processing
// (RTIP) operators.
//
// Every operator exchanges pixels over the same uniform stream: one pixel
// per clock when `valid` is high, no back-pressure (wired dataflow), with
// three framing flags carried beside the pixel value. The flags are this
// design's own choice of a "uniform interface"; the framework only states
// that all operators share one. Labels are 8 bits wide: 0 is background,
// 1..254 are blob labels and 255 marks blobs discarded because they touch
// the image border, as in the labeler described for the framework.
package rtip_pkg;

  // Framing flags travelling with every pixel.
  typedef struct packed {
    logic sof;  // first pixel of a frame
    logic eol;  // last pixel of a line
    logic eof;  // last pixel of a frame
  } rtip_flags_t;

  localparam int unsigned LABEL_W      = 8;
  localparam int unsigned MAX_LABEL    = 254;  // temporary and final labels
  localparam int unsigned BORDER_LABEL = 255;  // discarded border blobs

  typedef logic [LABEL_W-1:0] label_t;

  // Inverse affine mapping, fixed point with 16 fraction bits:
  // u = ux*x + uy*y + u0,  v = vx*x + vy*y + v0.
  localparam int unsigned FRAC = 16;
  typedef logic signed [31:0] fix_t;
  typedef struct packed {
    fix_t ux, uy, u0;
    fix_t vx, vy, v0;
  } affine_t;

  // Configuration word popped from the controller FIFO:
  // [31:24] operator id, [23:16] register index, [15:0] value.
  typedef struct packed {
    logic [7:0]  op;
    logic [7:0]  addr;
    logic [15:0] value;
  } cfg_word_t;

  // Run-time parameters of the operators, held by the configuration
  // controller.
  typedef struct packed {
    logic [15:0] width;
    logic [15:0] height;
    logic [15:0] angle;      // rotation, 65536 = one full turn
    logic [7:0]  threshold;  // binarisation
    logic        discard;    // labeler: discard blobs touching the border
  } rtip_cfg_t;

  // Operator ids on the configuration bus.
  localparam logic [7:0] OP_FRAME  = 8'd0;  // reg 0: width, reg 1: height
  localparam logic [7:0] OP_ROTATE = 8'd1;  // reg 0: angle
  localparam logic [7:0] OP_BIN    = 8'd2;  // reg 0: threshold
  localparam logic [7:0] OP_CCL    = 8'd3;  // reg 0: bit 0 = discard border blobs

endpackage
