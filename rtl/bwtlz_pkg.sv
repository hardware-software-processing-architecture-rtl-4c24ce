// Shared types and constants of the BWT/LZ77 coprocessor.
//
// The coprocessor sorts a block of N symbols for the Burrows-Wheeler
// transform and, reusing the same shift register, builds LZ77 tokens over the
// same block. This package holds what several modules agree on: the symbol
// width, the Weavesorter configuration codes, the cell operation codes, the
// entry of the control shift register, and the LEON2 FPU interface records.
//
// Symbols are 8 bits, as the design is described for ASCII text. The encoding
// of every enum below is this design's own choice.
package bwtlz_pkg;

  // Width of one symbol ("alpha").
  localparam int unsigned ALPHA = 8;

  // Configuration broadcast by the control unit to every comparator.
  typedef enum logic [1:0] {
    CFG_IDLE         = 2'd0,
    CFG_SHIFT_RIGHT  = 2'd1,
    CFG_SHIFT_LEFT   = 2'd2,
    CFG_COMPARE_SWAP = 2'd3
  } ws_cfg_e;

  // Operation code of one cell: where its registers load from.
  typedef enum logic [1:0] {
    OC_HOLD      = 2'd0,
    OC_FROM_LEFT = 2'd1,
    OC_FROM_RIGHT= 2'd2
  } cell_oc_e;

  // Side of the element a group-boundary bit refers to.
  typedef enum logic {
    SIDE_LEFT  = 1'b0,  // boundary lies on the left of this position
    SIDE_RIGHT = 1'b1   // boundary lies on the right of this position
  } side_e;

  // One stage of the control shift register.
  typedef struct packed {
    logic  bound;  // a group boundary is recorded at this stage
    side_e side;
  } ws_ctrl_t;

  // Instruction codes: SPARC V8 FPop opf field, carried in FpInst[8:0].
  localparam logic [8:0] OPF_FADDD  = 9'h042;  // load 16 symbols
  localparam logic [8:0] OPF_FSUBD  = 9'h046;  // read 8 result entries
  localparam logic [8:0] OPF_FSQRTS = 9'h029;  // run LZ77
  localparam logic [8:0] OPF_FSQRTD = 9'h02A;  // run BWT
  localparam logic [8:0] OPF_FSMULD = 9'h069;  // reset the core

  // LEON2 fpu_core input record.
  typedef struct packed {
    logic [9:0]  fp_inst;
    logic        fp_op;
    logic        fp_ld;
    logic        reset;
    logic [63:0] fprf_dout1;
    logic [63:0] fprf_dout2;
    logic [1:0]  rounding_mode;
    logic        ss_scan_mode;
    logic        fp_ctl_scan_in;
    logic        fpuholdn;
  } fpu_in_t;

  // LEON2 fpu_core output record. frac_result[0] is record bit 3
  // (FracResult is declared 54 downto 3 in the record).
  typedef struct packed {
    logic        fp_busy;
    logic [51:0] frac_result;
    logic [10:0] exp_result;
    logic        sign_result;
    logic        snnot_db;
    logic [5:0]  excep;
    logic [1:0]  condition_codes;
    logic        fp_ctl_scan_out;
  } fpu_out_t;

endpackage
