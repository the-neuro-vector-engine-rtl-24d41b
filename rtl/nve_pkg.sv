// nve_pkg: types and constants shared by the Neuro Vector Engine cluster.
//
// The cluster is a 16-lane SIMD multiply-accumulate engine driven by a VLIW
// instruction word. Sizes (16 lanes, 1024 x 64-bit scratchpad, 512 x 54-bit
// instruction buffer, 16/8/10-bit fixed-point words, 8 activation LUTs of
// 1024 x 8 bit) follow the published design. The bit layout of the
// instruction word is this design's own: 38 bits of issue-slot controls and
// 16 reserved bits that are not decoded.
package nve_pkg;

  localparam int unsigned LANES   = 16;    // MACC PEs
  localparam int unsigned NSI     = 7;     // shift-in register entries (IMG Reg 16-22)
  localparam int unsigned NW      = 4;     // weight register entries (W Reg 0-3)
  localparam int unsigned SP_DEPTH = 1024; // scratchpad words
  localparam int unsigned SP_AW   = 10;
  localparam int unsigned BUS_W   = 64;    // scratchpad word, input and output bus
  localparam int unsigned WW      = 16;    // weight  SIIIIIII.FFFFFFFF
  localparam int unsigned XW      = 8;     // input / activation .FFFFFFFF
  localparam int unsigned ACCW    = 17;    // accumulator, 9 integer + 8 fraction bits
  localparam int unsigned PW      = 10;    // potential SIII.FFFFFF
  localparam int unsigned NLUT    = 8;     // parallel activation lookups
  localparam int unsigned LUT_DEPTH = 1024;
  localparam int unsigned IB_DEPTH = 512;  // instruction buffer entries
  localparam int unsigned PCW     = 9;
  localparam int unsigned IW      = 54;    // instruction width

  typedef logic [XW-1:0]   pix_t;
  typedef logic signed [WW-1:0]   wgt_t;
  typedef logic signed [ACCW-1:0] acc_t;
  typedef logic signed [PW-1:0]   pot_t;

  // Port A slot: nothing, a read into the Reg Op stage, or a write.
  typedef enum logic [1:0] {PA_NOP = 2'd0, PA_READ = 2'd1, PA_WRITE = 2'd2} pa_op_e;
  // Weight register slot.
  typedef enum logic [1:0] {W_NOP = 2'd0, W_SET = 2'd1, W_SHIFT = 2'd2} w_op_e;
  // Image register slot.
  typedef enum logic [1:0] {IMG_NOP = 2'd0, IMG_SET = 2'd1, IMG_SHIFT = 2'd2} img_op_e;
  // Vector MACC slot: set accumulators to the broadcast bias, or accumulate.
  typedef enum logic [1:0] {EX_NOP = 2'd0, EX_BIAS = 2'd1, EX_MAC = 2'd2} ex_op_e;
  // Activation slot: look up O Reg 0-7 or O Reg 8-15.
  typedef enum logic [1:0] {WB_NOP = 2'd0, WB_LO = 2'd1, WB_HI = 2'd2} wb_op_e;
  // Program control: advance the modulo iteration offset, or stop.
  typedef enum logic [1:0] {CTL_NEXT = 2'd0, CTL_ADV = 2'd1, CTL_HALT = 2'd2} ctl_e;

  // One VLIW word, most significant field first.
  typedef struct packed {
    logic [15:0]      rsv;      // reserved, not decoded
    ctl_e             ctl;
    wb_op_e           wb;
    logic             sat;      // Saturate slot: capture accumulators into O Regs
    ex_op_e           ex;
    logic             si_set;   // load shift-in register from port B
    img_op_e          img;
    w_op_e            w;
    logic             pb_en;    // port B read
    logic             pb_mod;   // port B modulo addressing
    logic [SP_AW-1:0] pb_addr;
    pa_op_e           pa;
    logic             pa_mod;   // port A modulo addressing
    logic             pa_src;   // write data: 0 input bus, 1 activation feedback
    logic [SP_AW-1:0] pa_addr;
  } instr_t;

  // Controller configuration registers (cfg_addr values).
  typedef enum logic [2:0] {
    CFG_LOOP_START = 3'd0, CFG_LOOP_END = 3'd1, CFG_LOOP_COUNT = 3'd2,
    CFG_IMG_BASE = 3'd3, CFG_IMG_LEN = 3'd4, CFG_IMG_STRIDE = 3'd5
  } cfg_e;

endpackage
