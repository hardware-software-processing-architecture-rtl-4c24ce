// BWT/LZ77 coprocessor, attached to a LEON2 processor in place of its FPU.
//
// One shared bidirectional shift register (the Weavesorter machine) serves
// two compression front ends: it sorts the rotations of an N-symbol block for
// the Burrows-Wheeler transform, and it holds the sliding dictionary for LZ77,
// where an attached mechanism searches every cell at once and emits
// (position, length, next symbol) tokens. The control unit sequences both and
// speaks the LEON2 FPU handshake: the host loads the block with FADDd, starts
// a transform with FSQRTd (BWT) or FSQRTs (LZ77), and reads results back with
// FSUBd, eight 8-bit entries per 64-bit result.
//
// Ports are the LEON2 fpu_core records. fpu_in.reset is a synchronous reset.
// FpBusy is high from the cycle after FpOp until the result is ready. The
// 64-bit result is returned as FracResult (bits 51:0), ExpResult (62:52) and
// SignResult (63). Exceptions, condition codes and the scan chain are not used
// and read as zero; the rounding mode, scan inputs and fpuholdn are ignored.
// These port mappings are this design's own; the partition into control unit,
// Weavesorter and LZ77 mechanism follows the described core. An assertion
// checks the host side of the handshake: FpOp must not arrive while FpBusy is
// high. The mechanism's Matched output is left unconnected here because the
// control unit stores tokens on the mechanism's registered token strobe.
module bwt_lz77_coproc
  import bwtlz_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic     clk,
  input  fpu_in_t  fpu_in,
  output fpu_out_t fpu_out
);

  localparam int unsigned BETA_W = (N > 1) ? $clog2(N) : 1;

  logic              rst;
  logic              ws_clr;
  ws_cfg_e           ws_cfg;
  logic [ALPHA-1:0]  ws_in_char, ws_out_char;
  logic [BETA_W-1:0] ws_in_addr, ws_out_addr;
  ws_ctrl_t          ws_ctrl_in, ws_ctrl_out;
  logic              ws_done;
  logic [N-1:0]      ws_found;
  logic              lz_clr, lz_en, lz_last, lz_matched;
  logic              lz_tok_valid;
  logic [BETA_W-1:0] lz_tok_pos, lz_tok_len;
  logic [ALPHA-1:0]  lz_tok_sym;
  logic              busy;
  logic [63:0]       result;

  assign rst = fpu_in.reset;

  control_unit #(.N(N)) u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .start       (fpu_in.fp_op),
    .load        (fpu_in.fp_ld),
    .inst        (fpu_in.fp_inst),
    .op1         (fpu_in.fprf_dout1),
    .op2         (fpu_in.fprf_dout2),
    .busy        (busy),
    .result      (result),
    .ws_clr      (ws_clr),
    .ws_cfg      (ws_cfg),
    .ws_in_char  (ws_in_char),
    .ws_in_addr  (ws_in_addr),
    .ws_ctrl_in  (ws_ctrl_in),
    .ws_out_char (ws_out_char),
    .ws_out_addr (ws_out_addr),
    .ws_ctrl_out (ws_ctrl_out),
    .ws_done     (ws_done),
    .lz_clr      (lz_clr),
    .lz_en       (lz_en),
    .lz_last     (lz_last),
    .lz_tok_valid(lz_tok_valid),
    .lz_tok_pos  (lz_tok_pos),
    .lz_tok_len  (lz_tok_len),
    .lz_tok_sym  (lz_tok_sym)
  );

  weavesorter #(.N(N)) u_ws (
    .clk     (clk),
    .rst     (rst),
    .clr     (ws_clr),
    .cfg     (ws_cfg),
    .in_char (ws_in_char),
    .in_addr (ws_in_addr),
    .ctrl_in (ws_ctrl_in),
    .search  (ws_in_char),
    .out_char(ws_out_char),
    .out_addr(ws_out_addr),
    .ctrl_out(ws_ctrl_out),
    .done    (ws_done),
    .found   (ws_found)
  );

  lz77_mechanism #(.N(N)) u_lz (
    .clk      (clk),
    .rst      (rst),
    .clr      (lz_clr),
    .en       (lz_en),
    .last     (lz_last),
    .found    (ws_found),
    .symbol   (ws_in_char),
    .matched  (lz_matched),
    .tok_valid(lz_tok_valid),
    .tok_pos  (lz_tok_pos),
    .tok_len  (lz_tok_len),
    .tok_sym  (lz_tok_sym)
  );

  // Handshake rule: the host starts an instruction only while the
  // coprocessor is not busy.
  a_no_op_while_busy: assert property (
    @(posedge clk) disable iff (rst) fpu_in.fp_op |-> !busy)
    else $error("FpOp asserted while FpBusy is high");

  always_comb begin
    fpu_out                 = '0;
    fpu_out.fp_busy         = busy;
    fpu_out.frac_result     = result[51:0];
    fpu_out.exp_result      = result[62:52];
    fpu_out.sign_result     = result[63];
  end

endmodule
