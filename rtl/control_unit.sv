// Control unit of the BWT/LZ77 coprocessor.
//
// A single FSM that talks to the host over the LEON2 FPU handshake and runs
// the Weavesorter machine and the LZ77 mechanism. It owns the two arrays of
// the core: OriginalString (the N-symbol block) and SortedString (3N entries:
// the BWT last column plus index, or the LZ77 tokens).
//
// Instructions (FpInst[8:0], SPARC opf codes), each executed when FpLd brings
// the operands in the cycle after FpOp:
//   FADDd  - store 16 symbols: op1 bytes 7..0 then op2 bytes 7..0
//   FSQRTd - run the BWT on the stored block
//   FSQRTs - run LZ77 on the stored block
//   FSUBd  - return 8 SortedString entries (entry k in result byte k); after
//            the last entry, return the BWT index or the LZ77 entry count
//   FsMULd - reset the core's counters
// busy is low only while the FSM waits for an instruction; results are valid
// from the cycle busy falls until the next start.
//
// BWT sort (2 cycles per shift, each shift followed by a compare/swap):
//   fill      N shift-rights put (symbol, address) into the machine; the
//             smallest symbol settles in cell 0.
//   drains    N shifts take symbols out at the end they were last filled
//             from. In the same shift the symbol at address+1 (mod N) enters
//             at the other end, so the machine then holds the next column of
//             the rotation matrix. Directions alternate: drain-left,
//             drain-right, ...
//             The boundary bit that enters with each successor is set on the
//             first shift of a pass, when the leaving symbol differs from the
//             previous one, or when the previous one left with its own
//             boundary bit set. Groups of equal prefixes are therefore
//             sorted apart.
//   finish    when every control stage holds a boundary (Done) after a
//             drain, or after N drains, N shift-rights read the rows out,
//             row N-1 first. Each address minus the number of drains is the
//             start of that row's rotation; the symbol before that start is
//             L[row], and the row whose start is 0 is the index I.
// A block of N symbols takes 2N cycles per pass, (1 + drains) passes, then N
// more cycles.
//
// LZ77: N+1 cycles. Symbols shift left into the machine one per cycle and are
// searched at once; the token the mechanism presents one cycle later goes
// into SortedString as (position, length, symbol).
//
// The states, arrays, counters and instruction mapping follow the described
// control unit. The alternating drain, the boundary rule, ending with Done or
// N drains, the return to the wait state after a run and the past-the-end
// read value are this design's own completion of the description.
module control_unit
  import bwtlz_pkg::*;
#(
  parameter int unsigned N       = 256,
  parameter int unsigned ALPHA_W = ALPHA,
  parameter int unsigned BETA_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst,
  // host side (FPU handshake)
  input  logic               start,
  input  logic               load,
  input  logic [9:0]         inst,
  input  logic [63:0]        op1,
  input  logic [63:0]        op2,
  output logic               busy,
  output logic [63:0]        result,
  // Weavesorter machine side
  output logic               ws_clr,
  output ws_cfg_e            ws_cfg,
  output logic [ALPHA_W-1:0] ws_in_char,
  output logic [BETA_W-1:0]  ws_in_addr,
  output ws_ctrl_t           ws_ctrl_in,
  input  logic [ALPHA_W-1:0] ws_out_char,
  input  logic [BETA_W-1:0]  ws_out_addr,
  input  ws_ctrl_t           ws_ctrl_out,
  input  logic               ws_done,
  // LZ77 mechanism side
  output logic               lz_clr,
  output logic               lz_en,
  output logic               lz_last,
  input  logic               lz_tok_valid,
  input  logic [BETA_W-1:0]  lz_tok_pos,
  input  logic [BETA_W-1:0]  lz_tok_len,
  input  logic [ALPHA_W-1:0] lz_tok_sym
);

  localparam int unsigned SORTED_N = 3 * N;
  localparam int unsigned CW       = $clog2(SORTED_N + 16) + 1;
  localparam int unsigned IW       = $clog2(N + 1);

  typedef enum logic [2:0] {
    S_READ_INST,
    S_EXEC_INST,
    S_RESET,
    S_SHIFT_RIGHT,
    S_COMPARE_SWAP,
    S_SHIFT_LEFT,
    S_GET_RESULTS,
    S_LZ77
  } state_e;

  typedef enum logic [1:0] {MODE_NONE, MODE_BWT, MODE_LZ77} mode_e;

  state_e            state;
  mode_e             mode;
  logic [9:0]        instr;
  logic [ALPHA_W-1:0] original_string [N];
  logic [ALPHA_W-1:0] sorted_string   [SORTED_N];
  logic [CW-1:0]     counter;
  logic [IW-1:0]     iterations;
  logic              dir_left;
  logic              pass_end;
  logic [ALPHA_W-1:0] temp_char;
  logic              temp_bound;
  logic [BETA_W-1:0] original;
  logic [CW-1:0]     read_counter;
  logic [CW-1:0]     write_counter;
  logic [CW-1:0]     lz77_counter;

  // Successor of the symbol leaving the machine.
  logic [BETA_W-1:0]  next_addr;
  logic               new_bound;
  // Row bookkeeping while reading results.
  logic [BETA_W-1:0]  row_start;
  logic [BETA_W-1:0]  row;
  logic [BETA_W-1:0]  prev_addr;

  always_comb begin
    next_addr = (int'(ws_out_addr) == N - 1) ? '0 : ws_out_addr + 1'b1;
    new_bound = (counter == '0) || (temp_char != ws_out_char) || temp_bound;
    if (int'(ws_out_addr) >= int'(iterations))
      row_start = BETA_W'(int'(ws_out_addr) - int'(iterations));
    else
      row_start = BETA_W'(int'(ws_out_addr) + N - int'(iterations));
    prev_addr = (row_start == '0) ? BETA_W'(N - 1) : row_start - 1'b1;
    row       = BETA_W'(N - 1 - int'(counter));
  end

  // Machine drive.
  always_comb begin
    ws_clr     = 1'b0;
    ws_cfg     = CFG_IDLE;
    ws_in_char = '0;
    ws_in_addr = '0;
    ws_ctrl_in = '{bound: 1'b1, side: SIDE_LEFT};
    lz_clr     = 1'b0;
    lz_en      = 1'b0;
    lz_last    = 1'b0;
    unique case (state)
      S_RESET: begin
        ws_clr = 1'b1;
        lz_clr = 1'b1;
      end
      S_SHIFT_RIGHT: begin
        ws_cfg = CFG_SHIFT_RIGHT;
        if (iterations == '0) begin
          ws_in_char = original_string[counter[BETA_W-1:0]];
          ws_in_addr = counter[BETA_W-1:0];
          ws_ctrl_in = '{bound: 1'b0, side: SIDE_RIGHT};
        end else begin
          ws_in_char = original_string[next_addr];
          ws_in_addr = next_addr;
          ws_ctrl_in = '{bound: new_bound, side: SIDE_RIGHT};
        end
      end
      S_SHIFT_LEFT: begin
        ws_cfg     = CFG_SHIFT_LEFT;
        ws_in_char = original_string[next_addr];
        ws_in_addr = next_addr;
        ws_ctrl_in = '{bound: new_bound, side: SIDE_LEFT};
      end
      S_COMPARE_SWAP: ws_cfg = CFG_COMPARE_SWAP;
      S_GET_RESULTS:  ws_cfg = CFG_SHIFT_RIGHT;
      S_LZ77: begin
        if (int'(counter) < N) begin
          ws_cfg     = CFG_SHIFT_LEFT;
          ws_in_char = original_string[counter[BETA_W-1:0]];
          ws_in_addr = counter[BETA_W-1:0];
          ws_ctrl_in = '{bound: 1'b0, side: SIDE_LEFT};
          lz_en      = 1'b1;
          lz_last    = (int'(counter) == N - 1);
        end
      end
      default: ;
    endcase
  end

  assign busy = (state != S_READ_INST);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_READ_INST;
      mode          <= MODE_NONE;
      instr         <= '0;
      counter       <= '0;
      iterations    <= '0;
      dir_left      <= 1'b0;
      pass_end      <= 1'b0;
      temp_char     <= '0;
      temp_bound    <= 1'b0;
      original      <= '0;
      read_counter  <= '0;
      write_counter <= '0;
      lz77_counter  <= '0;
      result        <= '0;
      for (int i = 0; i < N; i++) original_string[i] <= '0;
      for (int i = 0; i < int'(SORTED_N); i++) sorted_string[i] <= '0;
    end else begin
      unique case (state)
        S_READ_INST: begin
          if (start) begin
            instr <= inst;
            state <= S_EXEC_INST;
          end
        end

        S_EXEC_INST: begin
          if (load) begin
            state <= S_READ_INST;
            unique case (instr[8:0])
              OPF_FADDD: begin
                for (int i = 0; i < 8; i++) begin
                  if (int'(read_counter) + i < N)
                    original_string[int'(read_counter) + i] <= op1[63 - 8*i -: 8];
                  if (int'(read_counter) + 8 + i < N)
                    original_string[int'(read_counter) + 8 + i] <= op2[63 - 8*i -: 8];
                end
                read_counter <= read_counter + CW'(16);
              end
              OPF_FSUBD: begin
                if ((mode == MODE_BWT  && int'(write_counter) < N) ||
                    (mode != MODE_BWT && write_counter < lz77_counter)) begin
                  for (int k = 0; k < 8; k++)
                    result[8*k +: 8] <= (int'(write_counter) + k < int'(SORTED_N)) ?
                                        8'(sorted_string[int'(write_counter) + k]) : 8'h00;
                end else if (mode == MODE_BWT) begin
                  result <= 64'(original);
                end else begin
                  result <= 64'(lz77_counter);
                end
                write_counter <= write_counter + CW'(8);
              end
              OPF_FSQRTD: begin
                mode  <= MODE_BWT;
                state <= S_RESET;
              end
              OPF_FSQRTS: begin
                mode  <= MODE_LZ77;
                state <= S_RESET;
              end
              OPF_FSMULD: begin
                mode  <= MODE_NONE;
                state <= S_RESET;
              end
              default: ;  // not a coprocessor instruction: ignored
            endcase
          end
        end

        S_RESET: begin
          counter       <= '0;
          iterations    <= '0;
          dir_left      <= 1'b0;
          pass_end      <= 1'b0;
          temp_char     <= '0;
          temp_bound    <= 1'b0;
          read_counter  <= '0;
          write_counter <= '0;
          lz77_counter  <= '0;
          unique case (mode)
            MODE_BWT:  state <= S_SHIFT_RIGHT;
            MODE_LZ77: state <= S_LZ77;
            default:   state <= S_READ_INST;
          endcase
        end

        S_SHIFT_RIGHT, S_SHIFT_LEFT: begin
          state <= S_COMPARE_SWAP;
          if (iterations != '0 || state == S_SHIFT_LEFT) begin
            // Drain: remember the leaving symbol for the next boundary.
            temp_char  <= ws_out_char;
            temp_bound <= ws_ctrl_out.bound;
          end
          if (int'(counter) == N - 1) begin
            counter  <= '0;
            dir_left <= (state == S_SHIFT_RIGHT);
            if (iterations != '0 || state == S_SHIFT_LEFT) begin
              iterations <= iterations + 1'b1;
              pass_end   <= 1'b1;
            end
          end else begin
            counter <= counter + 1'b1;
          end
        end

        S_COMPARE_SWAP: begin
          pass_end <= 1'b0;
          if (pass_end && (ws_done || int'(iterations) == N))
            state <= S_GET_RESULTS;
          else if (dir_left)
            state <= S_SHIFT_LEFT;
          else
            state <= S_SHIFT_RIGHT;
        end

        S_GET_RESULTS: begin
          sorted_string[int'(row)] <= original_string[prev_addr];
          if (row_start == '0) original <= row;
          if (int'(counter) == N - 1) begin
            sorted_string[N] <= 8'((row_start == '0) ? row : original);
            counter <= '0;
            state   <= S_READ_INST;
          end else begin
            counter <= counter + 1'b1;
          end
        end

        S_LZ77: begin
          if (lz_tok_valid && int'(lz77_counter) + 2 < int'(SORTED_N)) begin
            sorted_string[int'(lz77_counter)]     <= 8'(lz_tok_pos);
            sorted_string[int'(lz77_counter) + 1] <= 8'(lz_tok_len);
            sorted_string[int'(lz77_counter) + 2] <= 8'(lz_tok_sym);
            lz77_counter <= lz77_counter + CW'(3);
          end
          if (int'(counter) == N) begin
            counter <= '0;
            state   <= S_READ_INST;
          end else begin
            counter <= counter + 1'b1;
          end
        end

        default: state <= S_READ_INST;
      endcase
    end
  end

  initial begin
    assert (N % 16 == 0 && N <= 256 && ALPHA_W == 8)
      else $error("control_unit: N must be a multiple of 16 and at most 256, symbols 8 bits");
  end

endmodule
