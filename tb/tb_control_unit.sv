// Test of the control unit (N = 16) against a model of the machine it drives.
//
// The Weavesorter machine is replaced by a behavioural model kept here
// (shift, compare/swap of unblocked pairs, Done, output multiplexer), and the
// LZ77 mechanism by a stub that presents made-up tokens on chosen cycles.
// Checked: the FADDd byte order into OriginalString, the fill sequence
// (shift-right of symbol i with address i, each followed by a compare/swap),
// the BWT last column and index against sorted rotations, the run time,
// LZ77 symbol order and token storage, FSUBd packing and the past-the-end
// values, busy, and FsMULd.
module tb_control_unit;
  import bwtlz_pkg::*;

  localparam int N = 16;
  localparam int B = 4;

  logic clk = 1'b0, rst, start, load, busy;
  logic [9:0] inst;
  logic [63:0] op1, op2, result;
  logic ws_clr, lz_clr, lz_en, lz_last;
  ws_cfg_e ws_cfg;
  logic [7:0] ws_in_char, ws_out_char;
  logic [B-1:0] ws_in_addr, ws_out_addr;
  ws_ctrl_t ws_ctrl_in, ws_ctrl_out;
  logic ws_done;
  logic lz_tok_valid;
  logic [B-1:0] lz_tok_pos, lz_tok_len;
  logic [7:0] lz_tok_sym;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit #(.N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .load(load), .inst(inst), .op1(op1), .op2(op2),
    .busy(busy), .result(result), .ws_clr(ws_clr), .ws_cfg(ws_cfg), .ws_in_char(ws_in_char),
    .ws_in_addr(ws_in_addr), .ws_ctrl_in(ws_ctrl_in), .ws_out_char(ws_out_char),
    .ws_out_addr(ws_out_addr), .ws_ctrl_out(ws_ctrl_out), .ws_done(ws_done),
    .lz_clr(lz_clr), .lz_en(lz_en), .lz_last(lz_last), .lz_tok_valid(lz_tok_valid),
    .lz_tok_pos(lz_tok_pos), .lz_tok_len(lz_tok_len), .lz_tok_sym(lz_tok_sym));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---- behavioural machine ----
  logic [7:0]   m_c [N];
  logic [B-1:0] m_a [N];
  ws_ctrl_t     m_k [N];
  logic [N-1:0] m_b;
  always_comb begin
    for (int i = 0; i < N; i++) m_b[i] = m_k[i].bound;
    ws_done = &m_b;
    if (ws_cfg == CFG_SHIFT_RIGHT) begin
      ws_out_char = m_c[N-1]; ws_out_addr = m_a[N-1]; ws_ctrl_out = m_k[N-1];
    end else begin
      ws_out_char = m_c[0]; ws_out_addr = m_a[0]; ws_ctrl_out = m_k[0];
    end
  end
  always @(posedge clk) begin
    logic [7:0] c [N]; logic [B-1:0] a [N]; ws_ctrl_t k [N];
    c = m_c; a = m_a; k = m_k;
    if (rst || ws_clr) begin
      for (int i = 0; i < N; i++) begin c[i] = 0; a[i] = 0; k[i] = '{1'b1, SIDE_LEFT}; end
    end else if (ws_cfg == CFG_SHIFT_RIGHT) begin
      for (int i = N-1; i > 0; i--) begin c[i] = m_c[i-1]; a[i] = m_a[i-1]; k[i] = m_k[i-1]; end
      c[0] = ws_in_char; a[0] = ws_in_addr; k[0] = ws_ctrl_in;
    end else if (ws_cfg == CFG_SHIFT_LEFT) begin
      for (int i = 0; i < N-1; i++) begin c[i] = m_c[i+1]; a[i] = m_a[i+1]; k[i] = m_k[i+1]; end
      c[N-1] = ws_in_char; a[N-1] = ws_in_addr; k[N-1] = ws_ctrl_in;
    end else if (ws_cfg == CFG_COMPARE_SWAP) begin
      for (int p = 0; p < N; p += 2) begin
        if (!((m_k[p+1].bound && m_k[p+1].side == SIDE_LEFT) ||
              (m_k[p].bound && m_k[p].side == SIDE_RIGHT)) && m_c[p] > m_c[p+1]) begin
          c[p] = m_c[p+1]; a[p] = m_a[p+1]; c[p+1] = m_c[p]; a[p+1] = m_a[p];
        end
      end
    end
    m_c <= c; m_a <= a; m_k <= k;
  end

  // ---- LZ77 mechanism stub: a token after every third symbol and after the last ----
  int lz_seen = 0;
  logic [7:0] lz_sent [$];
  always @(posedge clk) begin
    lz_tok_valid <= 1'b0;
    if (rst || lz_clr) lz_seen <= 0;
    else if (lz_en) begin
      lz_seen <= lz_seen + 1;
      if (lz_seen % 3 == 2 || lz_last) begin
        lz_tok_valid <= 1'b1;
        lz_tok_pos   <= B'(lz_seen + 1);
        lz_tok_len   <= B'(lz_seen % 5);
        lz_tok_sym   <= ws_in_char;
        lz_sent.push_back(8'(lz_seen + 1) & 8'((1 << B) - 1));
        lz_sent.push_back(8'(lz_seen % 5));
        lz_sent.push_back(ws_in_char);
      end
    end
  end

  // ---- host ----
  int busy_cycles;
  task automatic fpop(input logic [8:0] opf, input logic [63:0] a, input logic [63:0] b);
    @(negedge clk);
    start = 1'b1; inst = {1'b0, opf};
    @(negedge clk);
    check(busy == 1'b1, "busy not raised the cycle after FpOp");
    start = 1'b0; load = 1'b1; op1 = a; op2 = b;
    busy_cycles = 1;
    @(negedge clk);
    load = 1'b0;
    while (busy) begin busy_cycles++; @(negedge clk); end
  endtask

  logic [7:0] blk [N];
  logic [7:0] ref_l [N];
  int rot [N];
  int ref_i;

  function automatic bit rot_less(input int a, input int b);
    for (int k = 0; k < N; k++)
      if (blk[(a+k)%N] != blk[(b+k)%N]) return blk[(a+k)%N] < blk[(b+k)%N];
    return 1'b0;
  endfunction

  task automatic load_block();
    for (int j = 0; j < N; j += 16) begin
      logic [63:0] a, b;
      for (int i = 0; i < 8; i++) begin
        a[63-8*i -: 8] = blk[j+i];
        b[63-8*i -: 8] = blk[j+8+i];
      end
      fpop(OPF_FADDD, a, b);
    end
    for (int i = 0; i < N; i++)
      check(dut.original_string[i] == blk[i], $sformatf("OriginalString[%0d]", i));
  endtask

  // Fill-sequence monitor.
  int fill_idx = -1;
  bit fill_ok = 1'b1;
  ws_cfg_e prev_cfg = CFG_IDLE;
  always @(posedge clk) begin
    if (fill_idx >= 0 && fill_idx < N) begin
      if (ws_cfg == CFG_SHIFT_RIGHT) begin
        if (prev_cfg == CFG_SHIFT_RIGHT || ws_in_char != blk[fill_idx] ||
            int'(ws_in_addr) != fill_idx) fill_ok = 1'b0;
        fill_idx <= fill_idx + 1;
      end
    end
    prev_cfg <= ws_cfg;
  end

  initial begin
    logic [63:0] w;
    int passes, idx, nent;
    rst = 1'b1; start = 0; load = 0; inst = 0; op1 = 0; op2 = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int rep = 0; rep < 12; rep++) begin
      for (int i = 0; i < N; i++) blk[i] = 8'("a" + $urandom_range(0, rep % 4 + 1));
      for (int i = 0; i < N; i++) rot[i] = i;
      for (int i = 1; i < N; i++) begin
        int v, j;
        v = rot[i]; j = i - 1;
        while (j >= 0 && rot_less(v, rot[j])) begin rot[j+1] = rot[j]; j--; end
        rot[j+1] = v;
      end
      for (int r = 0; r < N; r++) begin
        ref_l[r] = blk[(rot[r] + N - 1) % N];
        if (rot[r] == 0) ref_i = r;
      end
      load_block();
      fill_idx = 0; fill_ok = 1'b1;
      fpop(OPF_FSQRTD, 0, 0);
      check(fill_ok && fill_idx == N, "fill sequence");
      passes = int'(dut.iterations);
      check(busy_cycles == 2 + 2*N*(1 + passes) + N, $sformatf("BWT time %0d", busy_cycles));
      for (int j = 0; j < N; j += 8) begin
        fpop(OPF_FSUBD, 0, 0);
        for (int k = 0; k < 8; k++)
          check(result[8*k +: 8] == ref_l[j+k], $sformatf("L[%0d]", j+k));
      end
      fpop(OPF_FSUBD, 0, 0);
      idx = int'(result[15:0]);
      check(idx < N && (idx == ref_i || blk[rot[idx]] == blk[0]), $sformatf("index %0d vs %0d", idx, ref_i));
      // LZ77 on the same block with the token stub.
      lz_sent.delete();
      fpop(OPF_FSQRTS, 0, 0);
      check(busy_cycles == N + 3, $sformatf("LZ77 time %0d", busy_cycles));
      nent = lz_sent.size();
      for (int j = 0; j < nent; j += 8) begin
        fpop(OPF_FSUBD, 0, 0);
        for (int k = 0; k < 8 && j + k < nent; k++)
          check(result[8*k +: 8] == lz_sent[j+k], $sformatf("token entry %0d", j+k));
      end
      fpop(OPF_FSUBD, 0, 0);
      check(int'(result[15:0]) == nent, "token entry count");
    end
    // FsMULd: counters back to zero, new block loads from the start.
    fpop(OPF_FSMULD, 0, 0);
    check(dut.read_counter == 0 && dut.write_counter == 0, "FsMULd clears counters");
    for (int i = 0; i < N; i++) blk[i] = 8'(i * 7);
    load_block();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
