// End-to-end test of the BWT/LZ77 coprocessor through its FPU interface.
//
// Plays the LEON2 integer unit: loads blocks with FADDd, runs the BWT
// (FSQRTd) and LZ77 (FSQRTs), reads every result back with FSUBd, and resets
// the core with FsMULd. Expected results are computed here from the block
// alone: the BWT by sorting the N rotations, LZ77 by a greedy longest-match
// search (smallest distance among equal lengths, the block's last symbol
// always closing a token). Busy time of each run is checked against
// 2 + 2N(1 + passes) + N cycles (BWT) and N + 3 cycles (LZ77).
//
// Blocks: random text over a small alphabet, random bytes, a periodic block
// (never fully separated, so the sort stops after N passes), all-equal
// symbols, and "ABRACADABRAS" padded to N for LZ77, whose first six tokens
// are known. Every mechanism that should occur is counted and must occur.
module tb_bwt_lz77_coproc;
  import bwtlz_pkg::*;

  localparam int N = 16;
  localparam int NBLOCKS = 6;

  logic     clk = 1'b0;
  fpu_in_t  fpu_in;
  fpu_out_t fpu_out;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  bwt_lz77_coproc #(.N(N)) dut (.clk(clk), .fpu_in(fpu_in), .fpu_out(fpu_out));

  // Watchdog.
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] blk [N];
  logic [7:0] ref_l [N];
  int         ref_i;
  int         rot [N];
  logic [7:0] got [3*N+8];
  int         busy_cycles;

  // Mechanism counters.
  int n_done_exit = 0, n_limit_exit = 0, n_multi_pass = 0, n_swap = 0;
  int n_blocked = 0, n_lit = 0, n_match = 0, n_last_in_match = 0;
  int n_stall = 0, n_reset = 0, n_tail_read = 0;

  // Count compare/swap activity inside the machine.
  always @(posedge clk) begin
    if (dut.u_ws.cfg == CFG_COMPARE_SWAP) begin
      for (int k = 0; k < N/2; k++) begin
        if (dut.u_ws.cell_char[2*k] > dut.u_ws.cell_char[2*k+1]) begin
          if (dut.u_ws.cell_oc[2*k] == OC_FROM_RIGHT) n_swap++;
          else n_blocked++;
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Issue one FPop: FpOp with the instruction, operands with FpLd the next
  // cycle, then wait while FpBusy is high.
  task automatic fpop(input logic [8:0] opf, input logic [63:0] a, input logic [63:0] b);
    @(negedge clk);
    fpu_in.fp_op   = 1'b1;
    fpu_in.fp_inst = {1'b0, opf};
    @(negedge clk);
    fpu_in.fp_op      = 1'b0;
    fpu_in.fp_ld      = 1'b1;
    fpu_in.fprf_dout1 = a;
    fpu_in.fprf_dout2 = b;
    busy_cycles = 0;
    if (fpu_out.fp_busy) busy_cycles++;
    @(negedge clk);
    fpu_in.fp_ld = 1'b0;
    while (fpu_out.fp_busy) begin
      busy_cycles++;
      @(negedge clk);
    end
    if (busy_cycles > 1) n_stall++;
  endtask

  function automatic logic [63:0] fpu_word();
    return {fpu_out.sign_result, fpu_out.exp_result, fpu_out.frac_result};
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
  endtask

  task automatic read_back(input int entries);
    for (int j = 0; j < entries; j += 8) begin
      fpop(OPF_FSUBD, 64'h0, 64'h0);
      for (int k = 0; k < 8; k++) got[j+k] = fpu_word()[8*k +: 8];
    end
  endtask

  // rotation a < rotation b
  function automatic bit rot_less(input int a, input int b);
    for (int k = 0; k < N; k++) begin
      if (blk[(a+k)%N] != blk[(b+k)%N]) return blk[(a+k)%N] < blk[(b+k)%N];
    end
    return 1'b0;
  endfunction

  function automatic bit rot_equal(input int a, input int b);
    for (int k = 0; k < N; k++) if (blk[(a+k)%N] != blk[(b+k)%N]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic bwt_reference();
    for (int i = 0; i < N; i++) rot[i] = i;
    for (int i = 1; i < N; i++) begin   // insertion sort, stable
      int v = rot[i];
      int j = i - 1;
      while (j >= 0 && rot_less(v, rot[j])) begin
        rot[j+1] = rot[j];
        j--;
      end
      rot[j+1] = v;
    end
    for (int r = 0; r < N; r++) begin
      ref_l[r] = blk[(rot[r] + N - 1) % N];
      if (rot[r] == 0) ref_i = r;
    end
  endtask

  task automatic run_bwt(input string name);
    int passes, exp_cycles, idx, mism;
    bwt_reference();
    load_block();
    fpop(OPF_FSQRTD, 64'h0, 64'h0);
    passes = int'(dut.u_ctrl.iterations);
    exp_cycles = 2 + 2*N*(1 + passes) + N;
    check(busy_cycles == exp_cycles,
          $sformatf("%s: BWT busy %0d cycles, expected %0d", name, busy_cycles, exp_cycles));
    if (passes < N) n_done_exit++; else n_limit_exit++;
    if (passes >= 2) n_multi_pass++;
    read_back(N);
    fpop(OPF_FSUBD, 64'h0, 64'h0);
    idx = int'(fpu_word()[15:0]);
    n_tail_read++;
    mism = 0;
    for (int r = 0; r < N; r++) if (got[r] != ref_l[r]) mism++;
    check(mism == 0, $sformatf("%s: %0d symbols of L differ", name, mism));
    check(idx < N && rot_equal(rot[idx], 0),
          $sformatf("%s: index %0d, expected %0d", name, idx, ref_i));
    $display("%s: BWT passes=%0d cycles=%0d index=%0d", name, passes, exp_cycles, idx);
  endtask

  task automatic run_lz77(input string name, input bit known);
    int t, ntok, mism, cnt;
    logic [7:0] exp_tok [3*N];
    // Reference tokens.
    t = 0; ntok = 0;
    while (t < N) begin
      int best_len = 0, best_p = 0;
      for (int p = 1; p <= t; p++) begin
        int len = 0;
        while (t + len < N - 1 && blk[t+len] == blk[t+len-p]) len++;
        if (len > best_len) begin best_len = len; best_p = p; end
      end
      exp_tok[3*ntok]   = 8'(best_p);
      exp_tok[3*ntok+1] = 8'(best_len);
      exp_tok[3*ntok+2] = blk[t+best_len];
      if (best_len == 0) n_lit++; else n_match++;
      if (t + best_len == N - 1 && best_len > 0 && blk[N-1] == blk[N-1-best_p]) n_last_in_match++;
      ntok++;
      t += best_len + 1;
    end
    load_block();
    fpop(OPF_FSQRTS, 64'h0, 64'h0);
    check(busy_cycles == N + 3,
          $sformatf("%s: LZ77 busy %0d cycles, expected %0d", name, busy_cycles, N + 3));
    read_back(3*ntok);
    // Past the end: the number of token entries.
    fpop(OPF_FSUBD, 64'h0, 64'h0);
    cnt = int'(fpu_word()[15:0]);
    n_tail_read++;
    check(cnt == 3*ntok, $sformatf("%s: %0d token entries, expected %0d", name, cnt, 3*ntok));
    mism = 0;
    for (int i = 0; i < 3*ntok; i++) if (got[i] != exp_tok[i]) mism++;
    check(mism == 0, $sformatf("%s: %0d token entries differ", name, mism));
    if (known) begin
      // First six tokens of the ABRACADABRAS example.
      logic [7:0] k [18] = '{0,0,"A", 0,0,"B", 0,0,"R", 3,1,"C", 2,1,"D", 7,4,"S"};
      int km = 0;
      for (int i = 0; i < 18; i++) if (got[i] != k[i]) km++;
      check(km == 0, $sformatf("%s: example tokens differ in %0d entries", name, km));
    end
    $display("%s: LZ77 tokens=%0d", name, ntok);
  endtask

  initial begin
    static string abra = "ABRACADABRAS";
    fpu_in = '0;
    fpu_in.reset = 1'b1;
    repeat (3) @(negedge clk);
    fpu_in.reset = 1'b0;

    // LZ77 example from the description, padded with 'Z'.
    for (int i = 0; i < N; i++) blk[i] = (i < 12) ? abra[i] : 8'("Z");
    run_lz77("abracadabras", 1);

    for (int b = 0; b < NBLOCKS; b++) begin
      for (int i = 0; i < N; i++) blk[i] = 8'("a" + $urandom_range(0, 3));
      run_bwt($sformatf("text%0d", b));
      run_lz77($sformatf("text%0d", b), 0);
      for (int i = 0; i < N; i++) blk[i] = 8'($urandom);
      run_bwt($sformatf("bytes%0d", b));
      run_lz77($sformatf("bytes%0d", b), 0);
    end
    // Periodic block: equal rotations never separate.
    for (int i = 0; i < N; i++) blk[i] = (i % 4 < 2) ? 8'("x") : 8'("y");
    run_bwt("periodic");
    run_lz77("periodic", 0);
    // All symbols equal.
    for (int i = 0; i < N; i++) blk[i] = 8'h00;
    run_bwt("zeros");
    run_lz77("zeros", 0);

    // FsMULd resets the core; a new block then loads from the start.
    fpop(OPF_FSMULD, 64'h0, 64'h0);
    n_reset++;
    for (int i = 0; i < N; i++) blk[i] = 8'("a" + $urandom_range(0, 2));
    run_bwt("after_reset");

    check(n_done_exit > 0,     "no sort ended on Done");
    check(n_limit_exit > 0,    "no sort ended on the pass limit");
    check(n_multi_pass > 0,    "no sort needed both drain directions");
    check(n_swap > 0,          "no compare/swap exchanged cells");
    check(n_blocked > 0,       "no compare/swap was blocked by a group boundary");
    check(n_lit > 0,           "no literal LZ77 token");
    check(n_match > 0,         "no LZ77 match token");
    check(n_last_in_match > 0, "no block ended inside a match");
    check(n_stall > 0,         "host never waited on FpBusy");
    check(n_reset > 0,         "no reset instruction");
    check(n_tail_read > 0,     "no read past the end of the results");
    $display("events: done=%0d limit=%0d multipass=%0d swaps=%0d blocked=%0d lit=%0d match=%0d lastmatch=%0d stall=%0d reset=%0d tail=%0d",
             n_done_exit, n_limit_exit, n_multi_pass, n_swap, n_blocked, n_lit, n_match,
             n_last_in_match, n_stall, n_reset, n_tail_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
