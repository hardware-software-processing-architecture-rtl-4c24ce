// Modified Weavesorter machine: a bidirectional shift register that sorts.
//
// N cells (numbered 0 at the left to N-1 at the right) are wired as a shift
// register that can move right or left; the cells of each pair (2k, 2k+1)
// share a comparator that can swap them. Beside the cells runs the control
// shift register, one stage per cell, which shifts with the data but is never
// swapped: it marks the boundaries between groups of rows that must not be
// compared with each other. Done is the AND of all boundary bits, i.e. every
// symbol is a group of its own and the sort is complete.
//
// cfg is broadcast to all comparators each cycle:
//   Shift-Right  - in_char/in_addr/ctrl_in enter cell 0, cell N-1 leaves
//   Shift-Left   - they enter cell N-1, cell 0 leaves
//   Compare/Swap - every unblocked pair orders itself, smaller on the left
//   Idle         - nothing moves
// out_* and ctrl_out show the cell that leaves on the current configuration's
// shift: cell N-1 while cfg is Shift-Right, cell 0 otherwise. All of them are
// combinational views of registers, so a value shown in one cycle leaves at
// that cycle's clock edge.
//
// For LZ77 every cell compares its symbol with search. found[i] is cell i's
// result, forced low while the cell's control stage holds a boundary bit:
// LZ77 shifts symbols in with the bit clear, and clr sets it everywhere, so
// empty cells never match.
//
// Each control stage holds a side bit besides the boundary bit (the described
// machine has one bit per stage). A boundary inserted from the right refers to
// the left neighbour, and one inserted from the left refers to the right
// neighbour. Comparator k is blocked when cell 2k+1 holds a left-side boundary
// or cell 2k holds a right-side one. The side bit, the empty-cell marking, clr
// and the gating of found are this design's own; the cells, comparators,
// control shift register, AND gate and edge multiplexers follow the
// described machine.
module weavesorter
  import bwtlz_pkg::*;
#(
  parameter int unsigned N       = 256,
  parameter int unsigned ALPHA_W = ALPHA,
  parameter int unsigned BETA_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clr,
  input  ws_cfg_e            cfg,
  input  logic [ALPHA_W-1:0] in_char,
  input  logic [BETA_W-1:0]  in_addr,
  input  ws_ctrl_t           ctrl_in,
  input  logic [ALPHA_W-1:0] search,
  output logic [ALPHA_W-1:0] out_char,
  output logic [BETA_W-1:0]  out_addr,
  output ws_ctrl_t           ctrl_out,
  output logic               done,
  output logic [N-1:0]       found
);

  localparam ws_ctrl_t CTRL_EMPTY = '{bound: 1'b1, side: SIDE_LEFT};

  logic [ALPHA_W-1:0] cell_char [N];
  logic [BETA_W-1:0]  cell_addr [N];
  cell_oc_e           cell_oc   [N];
  logic               cell_found[N];
  ws_ctrl_t           ctrl_q    [N];
  logic [N-1:0]       bound_vec;

  // Cells: neighbours, with the machine input at both ends.
  for (genvar i = 0; i < N; i++) begin : g_cell
    logic [ALPHA_W-1:0] cl, cr;
    logic [BETA_W-1:0]  al, ar;
    if (i == 0) begin : g_first
      assign cl = in_char;
      assign al = in_addr;
    end else begin : g_mid_l
      assign cl = cell_char[i-1];
      assign al = cell_addr[i-1];
    end
    if (i == N-1) begin : g_last
      assign cr = in_char;
      assign ar = in_addr;
    end else begin : g_mid_r
      assign cr = cell_char[i+1];
      assign ar = cell_addr[i+1];
    end
    ws_cell #(.ALPHA_W(ALPHA_W), .BETA_W(BETA_W)) u_cell (
      .clk        (clk),
      .rst        (rst | clr),
      .oc         (cell_oc[i]),
      .char_from_l(cl),
      .char_from_r(cr),
      .addr_from_l(al),
      .addr_from_r(ar),
      .search     (search),
      .char_out   (cell_char[i]),
      .addr_out   (cell_addr[i]),
      .found      (cell_found[i])
    );
    assign found[i]     = cell_found[i] & ~ctrl_q[i].bound;
    assign bound_vec[i] = ctrl_q[i].bound;
  end

  // One comparator per pair of cells.
  for (genvar k = 0; k < N/2; k++) begin : g_cmp
    logic block;
    assign block = (ctrl_q[2*k+1].bound && ctrl_q[2*k+1].side == SIDE_LEFT) ||
                   (ctrl_q[2*k].bound   && ctrl_q[2*k].side   == SIDE_RIGHT);
    ws_comparator #(.ALPHA_W(ALPHA_W)) u_cmp (
      .config_code    (cfg),
      .control_bit    (block),
      .char_from_cell1(cell_char[2*k]),
      .char_from_cell2(cell_char[2*k+1]),
      .oc_cell1       (cell_oc[2*k]),
      .oc_cell2       (cell_oc[2*k+1])
    );
  end

  // Control shift register: shifts with the data, never swaps.
  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int i = 0; i < N; i++) ctrl_q[i] <= CTRL_EMPTY;
    end else if (cfg == CFG_SHIFT_RIGHT) begin
      ctrl_q[0] <= ctrl_in;
      for (int i = 1; i < N; i++) ctrl_q[i] <= ctrl_q[i-1];
    end else if (cfg == CFG_SHIFT_LEFT) begin
      ctrl_q[N-1] <= ctrl_in;
      for (int i = 0; i < N-1; i++) ctrl_q[i] <= ctrl_q[i+1];
    end
  end

  // N-input AND.
  assign done = &bound_vec;

  // Output multiplexer at the two ends.
  always_comb begin
    if (cfg == CFG_SHIFT_RIGHT) begin
      out_char = cell_char[N-1];
      out_addr = cell_addr[N-1];
      ctrl_out = ctrl_q[N-1];
    end else begin
      out_char = cell_char[0];
      out_addr = cell_addr[0];
      ctrl_out = ctrl_q[0];
    end
  end

  initial begin
    assert (N >= 2 && N % 2 == 0)
      else $error("weavesorter: N must be even and at least 2");
  end

endmodule
