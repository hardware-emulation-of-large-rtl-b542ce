// tb_prus_workload_40k: a 40,000-gate random logic network emulated on the
// full-size 8x8 matrix (625 two-input gates per sequencer).
//
// Each sequencer gets its own random netlist of 625 gates. Gate i of a
// sequencer takes two inputs, each either an external input IN(0..7) or the
// result of an earlier gate j < 609 of the same sequencer. Gate types cycle
// through AND, NAND, OR, NOR and XOR. Gates 0..608 store their result in
// Data Memory bit i; gates 609..624 drive OUT(0..15).
// Compilation to the instruction set (reverse Polish, one gate at a time):
//   AND  a b       ANDT -> dst      OR   ~a ~b     ANDI -> dst
//   NAND a b       ANDI -> dst      NOR  ~a ~b     ANDT -> dst
//   XOR  a b 0     XOR  -> dst      (the 0 is the never-written bit 1000)
// That is 2000 words plus END per sequencer, inside the 2048-word program
// memory. The expected outputs are computed here directly from the netlist.
// Several emulation cycles run with fresh random inputs; the cycle length
// (2001 clocks) is checked too.
module tb_prus_workload_40k;
  import prus_pkg::*;

  localparam int NPR = 64;
  localparam int NG = 625, NSTORE = 609;
  localparam int PLEN = 2001;
  localparam int N_CYC = 4;

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

  // netlist: type 0..4, input sources (<0: IN(-s-1), else gate index)
  int gt [NPR][NG];
  int ga [NPR][NG];
  int gb [NPR][NG];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_src(int i);
    int lim = (i < NSTORE) ? i : NSTORE;
    if (lim == 0 || ($urandom % 4) == 0) return -1 - int'($urandom % 8);
    return int'($urandom % lim);
  endfunction

  function automatic logic [9:0] src_addr(int s);
    return (s < 0) ? a_in(3'(-s - 1)) : 10'(s);
  endfunction

  function automatic logic gate_val(int t, logic a, logic b);
    case (t)
      0: return a & b;
      1: return !(a & b);
      2: return a | b;
      3: return !(a | b);
      default: return a ^ b;
    endcase
  endfunction

  task automatic load_programs;
    for (int p = 0; p < NPR; p++) begin
      int addr = 0;
      for (int i = 0; i < NG; i++) begin
        logic [9:0] dst = (i < NSTORE) ? 10'(i) : a_out(4'(i - NSTORE));
        logic [9:0] sa, sb;
        logic inv;
        instr_t w [4];
        int n;
        gt[p][i] = i % 5; ga[p][i] = rnd_src(i); gb[p][i] = rnd_src(i);
        sa = src_addr(ga[p][i]); sb = src_addr(gb[p][i]);
        inv = (gt[p][i] == 2 || gt[p][i] == 3);
        w[0] = i_read(1, inv, sa);
        w[1] = i_read(0, inv, sb);
        case (gt[p][i])
          0: begin w[2] = i_write(SBP_ANDT, dst); n = 3; end
          1: begin w[2] = i_write(SBP_ANDI, dst); n = 3; end
          2: begin w[2] = i_write(SBP_ANDI, dst); n = 3; end
          3: begin w[2] = i_write(SBP_ANDT, dst); n = 3; end
          default: begin w[2] = i_read(0, 0, 10'd1000); w[3] = i_write(SBP_XORB, dst); n = 4; end
        endcase
        for (int k = 0; k < n; k++) begin
          @(negedge clk);
          prog_we = 1; prog_sel = 6'(p); prog_addr = 11'(addr++); prog_data = w[k];
        end
      end
      @(negedge clk);
      prog_we = 1; prog_sel = 6'(p); prog_addr = 11'(addr++); prog_data = I_END;
      if (addr != PLEN) begin failures++; $display("FAIL program length %0d", addr); end
    end
    @(negedge clk) prog_we = 0;
  endtask

  task automatic check_outputs;
    for (int p = 0; p < NPR; p++) begin
      logic v [NG];
      logic [15:0] e;
      for (int i = 0; i < NG; i++) begin
        logic a = (ga[p][i] < 0) ? ext_in[p][-ga[p][i] - 1] : v[ga[p][i]];
        logic b = (gb[p][i] < 0) ? ext_in[p][-gb[p][i] - 1] : v[gb[p][i]];
        v[i] = gate_val(gt[p][i], a, b);
      end
      for (int k = 0; k < 16; k++) e[k] = v[NSTORE + k];
      checks++;
      if (ext_out[p] !== e) begin
        failures++; $display("FAIL p=%0d out=%h exp=%h", p, ext_out[p], e);
      end
    end
  endtask

  initial begin
    int t0, cyc;
    rst = 1; run = 0; prog_we = 0; prog_sel = 0; prog_addr = 0; prog_data = '0;
    ext_in = '0;
    @(posedge clk);
    load_programs();
    for (int p = 0; p < NPR; p++) ext_in[p] = 8'($urandom);
    rst = 1;
    @(negedge clk) rst = 0; run = 1;
    t0 = 1; cyc = 0;
    while (cyc < N_CYC) begin
      @(negedge clk);
      t0++;
      if (cycle_done) begin
        check_outputs();
        checks++;
        if (t0 != PLEN) begin failures++; $display("FAIL cycle length %0d", t0); end
        t0 = 0; cyc++;
        for (int p = 0; p < NPR; p++) ext_in[p] = 8'($urandom);
      end
    end
    $display("emulated %0d gates for %0d cycles", NPR * NG, N_CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
