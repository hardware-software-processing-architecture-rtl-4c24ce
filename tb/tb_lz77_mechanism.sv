// Test of the LZ77 token mechanism (N = 16).
//
// The dictionary is modelled here as a shift register of the symbols already
// seen; found[] is derived from it for each incoming symbol, as the
// Weavesorter cells would. Tokens are compared with a greedy longest-match
// reference (smallest distance among equal lengths, the last symbol of the
// block always closing a token), and each token must appear exactly one
// cycle after the symbol that closes it. The first block is the ABRACADABRAS
// example, whose six tokens are fixed.
module tb_lz77_mechanism;
  import bwtlz_pkg::*;

  localparam int N = 16;
  localparam int B = 4;

  logic clk = 1'b0, rst, clr, en, last;
  logic [N-1:0] found;
  logic [7:0] symbol, tok_sym;
  logic matched, tok_valid;
  logic [B-1:0] tok_pos, tok_len;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lz77_mechanism #(.N(N)) dut (
    .clk(clk), .rst(rst), .clr(clr), .en(en), .last(last), .found(found), .symbol(symbol),
    .matched(matched), .tok_valid(tok_valid), .tok_pos(tok_pos), .tok_len(tok_len),
    .tok_sym(tok_sym));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] blk [N];
  int n_lit = 0, n_match = 0, n_multi = 0;

  task automatic run_block(input int nsym, input bit fixed);
    logic [7:0] dict [N];
    bit         occ  [N];
    int exp_pos [N], exp_len [N], exp_end [N];
    logic [7:0] exp_sym [N];
    int ntok = 0, t = 0, seen = 0;
    // reference
    while (t < nsym) begin
      int best_len = 0, best_p = 0;
      for (int p = 1; p <= t; p++) begin
        int len = 0;
        while (t + len < nsym - 1 && blk[t+len] == blk[t+len-p]) len++;
        if (len > best_len) begin best_len = len; best_p = p; end
      end
      exp_pos[ntok] = best_p; exp_len[ntok] = best_len;
      exp_sym[ntok] = blk[t+best_len]; exp_end[ntok] = t + best_len;
      if (best_len == 0) n_lit++; else n_match++;
      ntok++;
      t += best_len + 1;
    end
    for (int i = 0; i < N; i++) begin dict[i] = 0; occ[i] = 0; end
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int c = 0; c <= nsym; c++) begin
      int mcount = 0;
      // token check: a token is due if symbol c-1 closed one
      bit due = 0;
      int k = 0;
      for (int j = 0; j < ntok; j++) if (exp_end[j] == c - 1) begin due = 1; k = j; end
      checks++;
      if (tok_valid !== due) begin
        failures++;
        $display("cycle %0d: tok_valid=%0d expected %0d", c, tok_valid, due);
      end else if (due) begin
        checks++;
        if (int'(tok_pos) != exp_pos[k] || int'(tok_len) != exp_len[k] || tok_sym != exp_sym[k]) begin
          failures++;
          $display("token %0d: (%0d,%0d,%h) expected (%0d,%0d,%h)", k, tok_pos, tok_len, tok_sym,
                   exp_pos[k], exp_len[k], exp_sym[k]);
        end
        if (fixed) begin
          int fp [6] = '{0, 0, 0, 3, 2, 7};
          int fl [6] = '{0, 0, 0, 1, 1, 4};
          checks++;
          if (int'(tok_pos) != fp[k] || int'(tok_len) != fl[k]) failures++;
        end
      end
      if (c < nsym) begin
        en = 1'b1; last = (c == nsym - 1); symbol = blk[c];
        for (int i = 0; i < N; i++) begin
          found[i] = occ[i] && dict[i] == blk[c];   // index 0 = left-most cell
          if (found[i]) mcount++;
        end
        if (mcount > 1) n_multi++;
        @(negedge clk);
        for (int i = 0; i < N-1; i++) begin dict[i] = dict[i+1]; occ[i] = occ[i+1]; end
        dict[N-1] = blk[c]; occ[N-1] = 1;
      end else begin
        en = 1'b0; last = 1'b0; found = '0;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    static string abra = "ABRACADABRAS";
    rst = 1'b1; clr = 1'b0; en = 1'b0; last = 1'b0; found = '0; symbol = 0;
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 12; i++) blk[i] = abra[i];
    run_block(12, 1);
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < N; i++) blk[i] = 8'("a" + $urandom_range(0, (r % 3) + 1));
      run_block(N, 0);
    end
    checks++;
    if (n_lit == 0 || n_match == 0 || n_multi == 0) failures++;
    $display("literals=%0d matches=%0d multi-position=%0d", n_lit, n_match, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
