// Test of the Weavesorter machine (N = 8).
//
// Part 1: random configurations and inputs; after every clock the cells and
// control stages are compared with a model of the machine kept here (shift
// with the control register, compare/swap of unblocked pairs, Done, output
// multiplexer, found).
// Part 2: the sorting property. N symbols are filled from the left (shift
// right, compare/swap after each) and drained from the left; the drained
// stream must be in ascending order. The same holds mirrored: filled from
// the right, drained from the right in descending order.
module tb_weavesorter;
  import bwtlz_pkg::*;

  localparam int N = 8;
  localparam int B = 3;

  logic clk = 1'b0, rst, clr;
  ws_cfg_e cfg;
  logic [7:0] in_char, out_char, search;
  logic [B-1:0] in_addr, out_addr;
  ws_ctrl_t ctrl_in, ctrl_out;
  logic done;
  logic [N-1:0] found;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weavesorter #(.N(N)) dut (
    .clk(clk), .rst(rst), .clr(clr), .cfg(cfg), .in_char(in_char), .in_addr(in_addr),
    .ctrl_in(ctrl_in), .search(search), .out_char(out_char), .out_addr(out_addr),
    .ctrl_out(ctrl_out), .done(done), .found(found));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]   m_c [N];
  logic [B-1:0] m_a [N];
  ws_ctrl_t     m_k [N];
  int n_swaps = 0, n_blocks = 0;

  task automatic model_step();
    logic [7:0] c [N]; logic [B-1:0] a [N]; ws_ctrl_t k [N];
    c = m_c; a = m_a; k = m_k;
    if (clr) begin
      for (int i = 0; i < N; i++) begin c[i] = 0; a[i] = 0; k[i] = '{1'b1, SIDE_LEFT}; end
    end else if (cfg == CFG_SHIFT_RIGHT) begin
      for (int i = N-1; i > 0; i--) begin c[i] = m_c[i-1]; a[i] = m_a[i-1]; k[i] = m_k[i-1]; end
      c[0] = in_char; a[0] = in_addr; k[0] = ctrl_in;
    end else if (cfg == CFG_SHIFT_LEFT) begin
      for (int i = 0; i < N-1; i++) begin c[i] = m_c[i+1]; a[i] = m_a[i+1]; k[i] = m_k[i+1]; end
      c[N-1] = in_char; a[N-1] = in_addr; k[N-1] = ctrl_in;
    end else if (cfg == CFG_COMPARE_SWAP) begin
      for (int p = 0; p < N; p += 2) begin
        bit blk = (m_k[p+1].bound && m_k[p+1].side == SIDE_LEFT) ||
                  (m_k[p].bound && m_k[p].side == SIDE_RIGHT);
        if (m_c[p] > m_c[p+1]) begin
          if (blk) n_blocks++;
          else begin
            c[p] = m_c[p+1]; a[p] = m_a[p+1]; c[p+1] = m_c[p]; a[p+1] = m_a[p];
            n_swaps++;
          end
        end
      end
    end
    m_c = c; m_a = a; m_k = k;
  endtask

  task automatic compare_state(input string where);
    bit ok = 1'b1;
    bit all_b = 1'b1;
    for (int i = 0; i < N; i++) begin
      if (dut.cell_char[i] !== m_c[i] || dut.cell_addr[i] !== m_a[i] || dut.ctrl_q[i] !== m_k[i]) ok = 0;
      if (found[i] !== (m_c[i] == search && !m_k[i].bound)) ok = 0;
      all_b &= m_k[i].bound;
    end
    if (done !== all_b) ok = 0;
    if (cfg == CFG_SHIFT_RIGHT) begin
      if (out_char !== m_c[N-1] || out_addr !== m_a[N-1] || ctrl_out !== m_k[N-1]) ok = 0;
    end else begin
      if (out_char !== m_c[0] || out_addr !== m_a[0] || ctrl_out !== m_k[0]) ok = 0;
    end
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("state mismatch %s", where);
    end
  endtask

  task automatic apply(input ws_cfg_e c, input logic [7:0] ch, input logic [B-1:0] ad, input ws_ctrl_t k);
    cfg = c; in_char = ch; in_addr = ad; ctrl_in = k;
    #1;
    compare_state("before edge");
    model_step();
    @(negedge clk);
    clr = 1'b0;
  endtask

  initial begin
    logic [7:0] vals [N];
    logic [7:0] outs [N];
    rst = 1'b1; clr = 1'b0; cfg = CFG_IDLE; in_char = 0; in_addr = 0; ctrl_in = '0; search = 0;
    for (int i = 0; i < N; i++) begin m_c[i] = 0; m_a[i] = 0; m_k[i] = '{1'b1, SIDE_LEFT}; end
    @(negedge clk);
    rst = 1'b0;
    // Part 1: random operation.
    for (int t = 0; t < 3000; t++) begin
      ws_ctrl_t k;
      k.bound = ($urandom_range(0, 3) == 0);
      k.side  = side_e'($urandom_range(0, 1));
      search  = 8'($urandom_range(0, 7));
      clr     = ($urandom_range(0, 200) == 0);
      apply(ws_cfg_e'($urandom_range(0, 3)), 8'($urandom_range(0, 7)), B'($urandom), k);
    end
    // Part 2: sorting property, both directions.
    for (int rep = 0; rep < 50; rep++) begin
      bit rightwards;
      rightwards = rep[0];
      clr = 1'b1;
      apply(CFG_IDLE, 0, 0, '0);
      for (int i = 0; i < N; i++) vals[i] = 8'($urandom_range(0, 20));
      for (int i = 0; i < N; i++) begin
        apply(rightwards ? CFG_SHIFT_LEFT : CFG_SHIFT_RIGHT, vals[i], B'(i),
              '{1'b0, rightwards ? SIDE_LEFT : SIDE_RIGHT});
        apply(CFG_COMPARE_SWAP, 0, 0, '0);
      end
      for (int i = 0; i < N; i++) begin
        cfg = rightwards ? CFG_SHIFT_RIGHT : CFG_SHIFT_LEFT;
        #1;
        outs[i] = out_char;
        apply(cfg, 0, 0, '{1'b1, rightwards ? SIDE_RIGHT : SIDE_LEFT});
        apply(CFG_COMPARE_SWAP, 0, 0, '0);
      end
      vals.sort();
      checks++;
      for (int i = 0; i < N; i++) begin
        if (outs[i] !== (rightwards ? vals[N-1-i] : vals[i])) begin
          failures++;
          $display("sort rep %0d: position %0d got %0d", rep, i, outs[i]);
          break;
        end
      end
      checks++;
      if (!done) failures++;
    end
    checks++;
    if (n_swaps == 0 || n_blocks == 0) failures++;
    $display("swaps=%0d blocked=%0d", n_swaps, n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
