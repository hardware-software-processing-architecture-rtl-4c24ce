// LZ77 token mechanism attached to the Weavesorter dictionary.
//
// The dictionary shifts left one symbol per cycle, so a cell at a fixed
// distance from the right end keeps pointing at the continuation of a string
// it matched in the previous cycle. Positions are counted 1..N from the
// right-most cell (cell N-1 is position 1).
//
//   AND-Group(b): live[p] = found[p] & history[p]; a position survives only if
//                 it matched the previous symbol too.
//   OR-Tree:      matched = |live.
//   Priority encoder: smallest surviving position (right-most cell).
//   AND-Group(a): history <= live while matched.
//   NOT:          when nothing matched, history is set to all ones and the
//                 length counter is cleared, so the next symbol starts afresh.
//   Counter:      counts the matched symbols of the current string.
// When a symbol does not match (or is the last of the block, which always
// closes a token), the token (position, length, symbol) is registered and
// shown with tok_valid during the next cycle: the two-stage pipeline of one
// matching stage and one position-encoding stage.
//
// Interface: en marks a cycle in which symbol is being shifted into the
// dictionary and found[] is its search result (index 0 = left-most cell);
// clr clears the mechanism before a block; rst is synchronous. The gate-level
// structure follows the described mechanism; holding the last position of a
// string in a register, the forced token at the end of a block and the
// widths are this design's own.
module lz77_mechanism
  import bwtlz_pkg::*;
#(
  parameter int unsigned N       = 256,
  parameter int unsigned ALPHA_W = ALPHA,
  parameter int unsigned BETA_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clr,
  input  logic               en,
  input  logic               last,
  input  logic [N-1:0]       found,
  input  logic [ALPHA_W-1:0] symbol,
  output logic               matched,
  output logic               tok_valid,
  output logic [BETA_W-1:0]  tok_pos,
  output logic [BETA_W-1:0]  tok_len,
  output logic [ALPHA_W-1:0] tok_sym
);

  logic [N-1:0]      history;   // bit p-1 = position p
  logic [N-1:0]      found_pos; // bit p-1 = position p
  logic [N-1:0]      live;
  logic [BETA_W-1:0] enc_pos;
  logic [BETA_W-1:0] pos_q;
  logic [BETA_W-1:0] len_q;
  logic              closes;

  for (genvar p = 0; p < N; p++) begin : g_pos
    assign found_pos[p] = found[N-1-p];
  end

  assign live    = found_pos & history;   // AND-Group(b)
  assign matched = |live;                 // OR-Tree

  // Priority encoder: lowest position wins.
  always_comb begin
    enc_pos = '0;
    for (int p = N-1; p >= 0; p--) begin
      if (live[p]) enc_pos = BETA_W'(p + 1);
    end
  end

  assign closes = !matched || last;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      history   <= '1;
      pos_q     <= '0;
      len_q     <= '0;
      tok_valid <= 1'b0;
      tok_pos   <= '0;
      tok_len   <= '0;
      tok_sym   <= '0;
    end else begin
      tok_valid <= 1'b0;
      if (en) begin
        if (closes) begin
          // Token: string found so far (if any) plus the current symbol.
          tok_valid <= 1'b1;
          tok_pos   <= pos_q;
          tok_len   <= len_q;
          tok_sym   <= symbol;
          history   <= '1;     // NOT -> set
          len_q     <= '0;     // NOT -> counter reset
          pos_q     <= '0;
        end else begin
          history   <= live;   // AND-Group(a)
          len_q     <= len_q + 1'b1;
          pos_q     <= enc_pos;
        end
      end
    end
  end

endmodule
