// tb_prus_matrix: end-to-end test of the full-size 8x8 PRUS network with its
// default parameters.
//
// Every sequencer gets its own program (all 154 words long, END at the same
// address), loaded through the programming port. One emulation cycle does:
//   A  addr 0-10   neighbour exchange: PASS IN(3) to the Output Buffer, read
//                  all eight neighbours (NP(5) inverted), write their AND to
//                  OUT(1) and the XOR of N, NE, E to OUT(2). Edge processors
//                  read across the torus wrap.
//   B  addr 11-146 an 8-bit ripple-carry adder per row, one full adder per
//                  processor: column c works in slot c, takes its carry from
//                  the west neighbour's Output Buffer (column 0 from IN(2)),
//                  writes sum to OUT(0) and carry to OUT(3). Sequencers idle
//                  with NOOP outside their slot.
//   C  addr 147-153 a toggle flip-flop kept in Data Memory: q ^= IN(4), q to
//                  OUT(4); then END.
// After each emulation cycle (cycle_done) all outputs are compared with
// values computed here from the inputs by integer arithmetic, and new random
// inputs are applied. The emulation cycle length (154 clocks) is checked.
// Mechanism counters at the end must all be non-zero.
module tb_prus_matrix;
  import prus_pkg::*;

  localparam int ROWS = 8, COLS = 8, NPR = ROWS * COLS;
  localparam int PLEN = 154;
  localparam int N_CYC = 12;

  logic clk = 0, rst, run, prog_we;
  logic [5:0]  prog_sel;
  logic [10:0] prog_addr;
  instr_t      prog_data;
  logic [NPR-1:0][7:0]  ext_in;
  logic [NPR-1:0][15:0] ext_out;
  logic [10:0] pc;
  logic cycle_done;

  prus_matrix dut (
    .clk, .rst, .run, .prog_we, .prog_sel, .prog_addr, .prog_data,
    .ext_in, .ext_out, .pc, .cycle_done
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pass = 0, n_np = 0, n_wrap = 0, n_inv = 0, n_init = 0, n_in = 0,
      n_dmw = 0, n_dmr = 0, n_outw = 0, n_andt = 0, n_andi = 0, n_xor = 0,
      n_noop = 0, n_end = 0, n_toggle = 0, n_cycles = 0;

  instr_t prog [NPR][PLEN];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  task automatic build;
    for (int p = 0; p < NPR; p++) begin
      int c = p % COLS;
      int a = 0;
      logic [9:0] cin;
      for (int i = 0; i < PLEN; i++) prog[p][i] = I_NOOP;
      // A: neighbour exchange
      prog[p][a++] = i_write(SBP_PASS, a_in(3));
      for (int j = 0; j < 8; j++) begin
        int k = (j + 3) % 8;                 // NP3..NP7, NP0, NP1, NP2
        prog[p][a++] = i_read(j == 0, k == 5, a_np(3'(k)));
      end
      prog[p][a++] = i_write(SBP_ANDT, a_out(1));
      prog[p][a++] = i_write(SBP_XORB, a_out(2));
      // B: full adder in slot c
      a = 11 + c * 17;
      cin = (c == 0) ? a_in(2) : a_np(6);
      prog[p][a++] = i_read(1, 0, a_in(0));
      prog[p][a++] = i_read(0, 0, a_in(1));
      prog[p][a++] = i_read(0, 0, cin);
      prog[p][a++] = i_write(SBP_XORB, a_out(0));
      prog[p][a++] = i_read(1, 0, a_in(0));
      prog[p][a++] = i_read(0, 0, a_in(1));
      prog[p][a++] = i_write(SBP_ANDI, 10'd0);
      prog[p][a++] = i_read(1, 0, a_in(0));
      prog[p][a++] = i_read(0, 0, cin);
      prog[p][a++] = i_write(SBP_ANDI, 10'd1);
      prog[p][a++] = i_read(1, 0, a_in(1));
      prog[p][a++] = i_read(0, 0, cin);
      prog[p][a++] = i_write(SBP_ANDI, 10'd2);
      prog[p][a++] = i_read(1, 0, 10'd0);
      prog[p][a++] = i_read(0, 0, 10'd1);
      prog[p][a++] = i_read(0, 0, 10'd2);
      prog[p][a++] = i_write(SBP_ANDI, a_out(3));
      // C: toggle flip-flop in DM[10]; DM[20] is never written (constant 0)
      a = 147;
      prog[p][a++] = i_read(1, 0, 10'd10);
      prog[p][a++] = i_read(0, 0, a_in(4));
      prog[p][a++] = i_read(0, 0, 10'd20);
      prog[p][a++] = i_write(SBP_XORB, 10'd10);
      prog[p][a++] = i_read(1, 0, 10'd10);
      prog[p][a++] = i_write(SBP_ANDT, a_out(4));
      prog[p][a++] = I_END;
    end
  endtask

  // mechanism tally, from the programs as executed (one pass per cycle)
  task automatic tally;
    for (int p = 0; p < NPR; p++)
      for (int i = 0; i < PLEN; i++) begin
        instr_t w = prog[p][i];
        logic ext = (w[9:4] == EXT_PAGE);
        if (w == I_NOOP) n_noop++;
        else if (w == I_END) n_end++;
        else if (!w[11]) begin
          if (w[12]) n_init++;
          if (w[10]) n_inv++;
          if (ext && w[3]) begin
            int r = p / COLS, c = p % COLS, k = int'(w[2:0]);
            n_np++;
            if ((r == 0 && k inside {0, 1, 7}) || (r == ROWS-1 && k inside {3, 4, 5}) ||
                (c == 0 && k inside {5, 6, 7}) || (c == COLS-1 && k inside {1, 2, 3}))
              n_wrap++;
          end else if (ext) n_in++;
          else n_dmr++;
        end else begin
          case (w[12:10])
            SBP_ANDT: n_andt++;
            SBP_ANDI: n_andi++;
            SBP_XORB: n_xor++;
            SBP_PASS: n_pass++;
            default: ;
          endcase
          if (w[12:10] != SBP_PASS) begin
            if (ext) n_outw++; else n_dmw++;
          end
        end
      end
  endtask

  // -------------------------------------------------------------- reference
  function automatic int nb(int p, int k);
    int dr [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};
    int dc [8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    int r = p / COLS, c = p % COLS;
    return ((r + dr[k] + ROWS) % ROWS) * COLS + (c + dc[k] + COLS) % COLS;
  endfunction

  logic tog [NPR];

  task automatic check_outputs;
    for (int p = 0; p < NPR; p++) begin
      logic e_and, e_xor, e_sum, e_cout;
      int r = p / COLS, c = p % COLS;
      int A = 0, B = 0, S, m;
      e_and = 1;
      for (int k = 0; k < 8; k++) e_and &= (k == 5) ? !ext_in[nb(p, k)][3] : ext_in[nb(p, k)][3];
      e_xor = ext_in[nb(p, 0)][3] ^ ext_in[nb(p, 1)][3] ^ ext_in[nb(p, 2)][3];
      for (int j = 0; j < COLS; j++) begin
        A |= int'(ext_in[r * COLS + j][0]) << j;
        B |= int'(ext_in[r * COLS + j][1]) << j;
      end
      m = (1 << (c + 1)) - 1;
      S = (A & m) + (B & m) + int'(ext_in[r * COLS][2]);
      e_sum  = S[c];
      e_cout = S[c + 1];
      checks++;
      if (ext_out[p][4:0] !== {tog[p], e_cout, e_xor, e_and, e_sum} || ext_out[p][15:5] !== '0) begin
        failures++;
        $display("FAIL p=%0d out=%b exp=%b", p, ext_out[p][4:0], {tog[p], e_cout, e_xor, e_and, e_sum});
      end
    end
  endtask

  // ------------------------------------------------------------------ run
  initial begin
    int t0, cyc;
    rst = 1; run = 0; prog_we = 0; prog_sel = 0; prog_addr = 0; prog_data = '0;
    ext_in = '0;
    build();
    @(posedge clk);
    for (int p = 0; p < NPR; p++)
      for (int i = 0; i < PLEN; i++) begin
        @(negedge clk);
        prog_we = 1; prog_sel = 6'(p); prog_addr = 11'(i); prog_data = prog[p][i];
      end
    @(negedge clk) prog_we = 0;
    for (int p = 0; p < NPR; p++) tog[p] = 0;
    for (int p = 0; p < NPR; p++) ext_in[p] = 8'($urandom);
    rst = 1;
    @(negedge clk) rst = 0; run = 1;
    t0 = 1; cyc = 0;   // the clock that raises run already executes address 0
    while (cyc < N_CYC) begin
      @(negedge clk);
      t0++;
      if (cycle_done) begin
        for (int p = 0; p < NPR; p++) tog[p] ^= ext_in[p][4];
        for (int p = 0; p < NPR; p++) if (ext_in[p][4]) n_toggle++;
        check_outputs();
        checks++;
        if (t0 != PLEN) begin failures++; $display("FAIL cycle length %0d", t0); end
        tally();
        t0 = 0; cyc++;
        n_cycles++;
        // second cycle: a = b = carry-in = 1 everywhere, so the carry ripples
        // through all eight columns
        for (int p = 0; p < NPR; p++)
          ext_in[p] = (cyc == 1) ? 8'b0001_0111 : 8'($urandom);
      end
    end
    // run low freezes the counter
    @(negedge clk) run = 0;
    begin
      logic [10:0] hold;
      hold = pc;
      repeat (5) @(negedge clk);
      checks++;
      if (pc !== hold) begin failures++; $display("FAIL counter moved while run=0"); end
    end
    $display("mechanisms: pass=%0d np_read=%0d wrap_read=%0d inv=%0d init=%0d in_read=%0d dm_read=%0d dm_write=%0d out_write=%0d andt=%0d andi=%0d xor=%0d noop=%0d end=%0d toggle=%0d",
             n_pass, n_np, n_wrap, n_inv, n_init, n_in, n_dmr, n_dmw, n_outw, n_andt, n_andi, n_xor, n_noop, n_end, n_toggle);
    if (n_pass == 0 || n_np == 0 || n_wrap == 0 || n_inv == 0 || n_init == 0 || n_in == 0 ||
        n_dmr == 0 || n_dmw == 0 || n_outw == 0 || n_andt == 0 || n_andi == 0 || n_xor == 0 ||
        n_noop == 0 || n_end == 0 || n_toggle == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
