// Comparator of one pair of Weavesorter cells.
//
// Turns the global configuration into the operation codes of its two cells:
//   Shift-Right  - both cells load from their left neighbour
//   Shift-Left   - both cells load from their right neighbour
//   Compare/Swap - if the left cell's symbol is greater than the right cell's,
//                  the two exchange contents (left loads from right, right
//                  loads from left); otherwise both hold
//   Idle         - both hold
// control_bit blocks the swap when the two cells belong to different groups
// (different columns of the rotation matrix being sorted).
//
// Purely combinational. The behaviour is the described one; the code values
// come from the shared package.
module ws_comparator
  import bwtlz_pkg::*;
#(
  parameter int unsigned ALPHA_W = ALPHA
) (
  input  ws_cfg_e            config_code,
  input  logic               control_bit,
  input  logic [ALPHA_W-1:0] char_from_cell1,
  input  logic [ALPHA_W-1:0] char_from_cell2,
  output cell_oc_e           oc_cell1,
  output cell_oc_e           oc_cell2
);

  always_comb begin
    oc_cell1 = OC_HOLD;
    oc_cell2 = OC_HOLD;
    unique case (config_code)
      CFG_SHIFT_RIGHT: begin
        oc_cell1 = OC_FROM_LEFT;
        oc_cell2 = OC_FROM_LEFT;
      end
      CFG_SHIFT_LEFT: begin
        oc_cell1 = OC_FROM_RIGHT;
        oc_cell2 = OC_FROM_RIGHT;
      end
      CFG_COMPARE_SWAP: begin
        if (!control_bit && (char_from_cell1 > char_from_cell2)) begin
          oc_cell1 = OC_FROM_RIGHT;
          oc_cell2 = OC_FROM_LEFT;
        end
      end
      default: ;  // idle
    endcase
  end

endmodule
