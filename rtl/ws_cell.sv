// Weavesorter cell with LZ77 search comparator.
//
// Holds one symbol (char) and the address it came from (addr). Each clock the
// operation code selects what the two registers load: the left neighbour's
// values (shift right, or the right half of a swap), the right neighbour's
// values (shift left, or the left half of a swap), or their own (hold). The
// address travels with the symbol but never affects sorting.
//
// For LZ77 the cell also compares its symbol with the broadcast search symbol
// and raises found combinationally in the same cycle; the dictionary is thus
// searched in every cell at once.
//
// Interface: rst is a synchronous, active-high clear. The two registers, the
// input multiplexer and the search comparator follow the described cell; the
// operation-code encoding and the clear are this design's choices.
module ws_cell
  import bwtlz_pkg::*;
#(
  parameter int unsigned ALPHA_W = ALPHA,
  parameter int unsigned BETA_W  = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  cell_oc_e           oc,
  input  logic [ALPHA_W-1:0] char_from_l,
  input  logic [ALPHA_W-1:0] char_from_r,
  input  logic [BETA_W-1:0]  addr_from_l,
  input  logic [BETA_W-1:0]  addr_from_r,
  input  logic [ALPHA_W-1:0] search,
  output logic [ALPHA_W-1:0] char_out,
  output logic [BETA_W-1:0]  addr_out,
  output logic               found
);

  always_ff @(posedge clk) begin
    if (rst) begin
      char_out <= '0;
      addr_out <= '0;
    end else begin
      unique case (oc)
        OC_FROM_LEFT: begin
          char_out <= char_from_l;
          addr_out <= addr_from_l;
        end
        OC_FROM_RIGHT: begin
          char_out <= char_from_r;
          addr_out <= addr_from_r;
        end
        default: ;  // hold
      endcase
    end
  end

  assign found = (char_out == search);

endmodule
