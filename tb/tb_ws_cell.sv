// Test of one Weavesorter cell: random operation codes and neighbour values
// are applied and the stored symbol/address are compared each cycle with a
// model register; found is checked against a direct comparison with the
// search symbol. Also checks the synchronous clear.
module tb_ws_cell;
  import bwtlz_pkg::*;

  logic clk = 1'b0, rst;
  cell_oc_e oc;
  logic [7:0] cl, cr, srch, q_char, m_char;
  logic [7:0] al, ar, q_addr, m_addr;
  logic found;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ws_cell #(.ALPHA_W(8), .BETA_W(8)) dut (
    .clk(clk), .rst(rst), .oc(oc), .char_from_l(cl), .char_from_r(cr),
    .addr_from_l(al), .addr_from_r(ar), .search(srch),
    .char_out(q_char), .addr_out(q_addr), .found(found));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_l = 0, n_r = 0, n_h = 0, n_f = 0;
    rst = 1'b1; oc = OC_HOLD; cl = '0; cr = '0; al = '0; ar = '0; srch = '0;
    m_char = '0; m_addr = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int r;
      r = $urandom_range(0, 2);
      oc = (r == 0) ? OC_HOLD : (r == 1) ? OC_FROM_LEFT : OC_FROM_RIGHT;
      cl = 8'($urandom); cr = 8'($urandom); al = 8'($urandom); ar = 8'($urandom);
      srch = ($urandom_range(0, 3) == 0) ? q_char : 8'($urandom);
      #1;
      checks++;
      if (found !== (q_char == srch)) begin failures++; $display("found wrong at %0d", t); end
      if (found) n_f++;
      if (oc == OC_FROM_LEFT) begin m_char = cl; m_addr = al; n_l++; end
      else if (oc == OC_FROM_RIGHT) begin m_char = cr; m_addr = ar; n_r++; end
      else n_h++;
      @(negedge clk);
      checks++;
      if (q_char !== m_char || q_addr !== m_addr) begin
        failures++;
        $display("cell %0d: got %h/%h expected %h/%h", t, q_char, q_addr, m_char, m_addr);
      end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++;
    if (q_char !== 8'h00 || q_addr !== 8'h00) failures++;
    checks++;
    if (n_l == 0 || n_r == 0 || n_h == 0 || n_f == 0) failures++;
    $display("after clear %h/%h, ops l=%0d r=%0d h=%0d found=%0d", q_char, q_addr, n_l, n_r, n_h, n_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
