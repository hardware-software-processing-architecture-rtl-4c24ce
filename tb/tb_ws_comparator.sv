// Test of the Weavesorter comparator: every configuration, control bit and a
// sweep of symbol pairs, against the operation codes the four configurations
// must produce.
module tb_ws_comparator;
  import bwtlz_pkg::*;

  ws_cfg_e cfg;
  logic cb;
  logic [7:0] c1, c2;
  cell_oc_e oc1, oc2, e1, e2;
  int checks = 0, failures = 0;

  ws_comparator #(.ALPHA_W(8)) dut (
    .config_code(cfg), .control_bit(cb), .char_from_cell1(c1), .char_from_cell2(c2),
    .oc_cell1(oc1), .oc_cell2(oc2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 4; ci++) begin
      for (int b = 0; b < 2; b++) begin
        for (int a = 0; a < 256; a += 5) begin
          for (int d = 0; d < 256; d += 7) begin
            cfg = ws_cfg_e'(ci); cb = b[0]; c1 = 8'(a); c2 = 8'(d);
            #1;
            case (ci)
              1: begin e1 = OC_FROM_LEFT;  e2 = OC_FROM_LEFT;  end
              2: begin e1 = OC_FROM_RIGHT; e2 = OC_FROM_RIGHT; end
              3: if (b == 0 && a > d) begin e1 = OC_FROM_RIGHT; e2 = OC_FROM_LEFT; end
                 else begin e1 = OC_HOLD; e2 = OC_HOLD; end
              default: begin e1 = OC_HOLD; e2 = OC_HOLD; end
            endcase
            checks++;
            if (oc1 !== e1 || oc2 !== e2) begin
              failures++;
              if (failures < 10) $display("cfg=%0d cb=%0d %0d,%0d -> %0d,%0d", ci, b, a, d, oc1, oc2);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
