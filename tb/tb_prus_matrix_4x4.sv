// tb_prus_matrix_4x4: checks the torus wiring of a 4x4 network, the size of
// the matrix drawing, neighbour by neighbour, and runs it with the OR-block
// variant of the single bit processor.
//
// Program (same in every sequencer), repeated for k = 0..7:
//   PASS IN(0); READ+init NP(k); ANDT -> OUT(k)
// so after one emulation cycle OUT(k) holds IN(0) of neighbour k. Four
// emulation cycles carry bits 0..3 of every processor's number, from which
// the testbench rebuilds the number of each neighbour. The processor in row
// 1, column 1 (P11 in 1-based names) must see P41 (N), P42 (NE), P12 (E),
// P22 (SE), P21 (S), P24 (SW), P14 (W) and P44 (NW), as drawn; all other
// processors are checked against the torus formula. A final cycle tests the
// OR block: OUT(8) = IN(1) | IN(2) | ~IN(3) on every processor.
module tb_prus_matrix_4x4;
  import prus_pkg::*;

  localparam int R = 4, C = 4, NPR = R * C;
  localparam int PLEN = 8 * 3 + 5;

  logic clk = 0, rst, run, prog_we;
  logic [3:0]  prog_sel;
  logic [10:0] prog_addr;
  instr_t      prog_data;
  logic [NPR-1:0][7:0]  ext_in;
  logic [NPR-1:0][15:0] ext_out;
  logic [10:0] pc;
  logic cycle_done;

  prus_matrix #(.ROWS(R), .COLS(C), .SECOND(SBP_OR)) dut (
    .clk, .rst, .run, .prog_we, .prog_sel, .prog_addr, .prog_data,
    .ext_in, .ext_out, .pc, .cycle_done
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [NPR][8];
  instr_t prog [PLEN];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1-based name "Prc" -> index
  function automatic int pid(int rc);
    return (rc / 10 - 1) * C + (rc % 10 - 1);
  endfunction

  task automatic wait_cycle;
    do @(negedge clk); while (!cycle_done);
  endtask

  initial begin
    int a = 0;
    int drawn [8] = '{41, 42, 12, 22, 21, 24, 14, 44};
    for (int k = 0; k < 8; k++) begin
      prog[a++] = i_write(SBP_PASS, a_in(0));
      prog[a++] = i_read(1, 0, a_np(3'(k)));
      prog[a++] = i_write(SBP_ANDT, a_out(4'(k)));
    end
    prog[a++] = i_read(1, 0, a_in(1));
    prog[a++] = i_read(0, 0, a_in(2));
    prog[a++] = i_read(0, 1, a_in(3));
    prog[a++] = i_write(SBP_XORB, a_out(8));   // code 110 selects the OR block here
    prog[a++] = I_END;

    rst = 1; run = 0; prog_we = 0; prog_sel = 0; prog_addr = 0; prog_data = '0; ext_in = '0;
    for (int p = 0; p < NPR; p++)
      for (int i = 0; i < PLEN; i++) begin
        @(negedge clk);
        prog_we = 1; prog_sel = 4'(p); prog_addr = 11'(i); prog_data = prog[i];
      end
    @(negedge clk) prog_we = 0;
    for (int p = 0; p < NPR; p++) for (int k = 0; k < 8; k++) seen[p][k] = 0;
    for (int b = 0; b < 5; b++) begin
      for (int p = 0; p < NPR; p++) begin
        ext_in[p] = 8'($urandom);
        ext_in[p][0] = (b < 4) ? p[b] : 1'b0;
      end
      if (b == 0) begin
        @(negedge clk) rst = 0; run = 1;
      end
      wait_cycle();
      for (int p = 0; p < NPR; p++) begin
        if (b < 4)
          for (int k = 0; k < 8; k++) seen[p][k] |= int'(ext_out[p][k]) << b;
        checks++;
        if (ext_out[p][8] !== (ext_in[p][1] | ext_in[p][2] | !ext_in[p][3])) begin
          failures++; $display("FAIL OR block p=%0d", p);
        end
      end
    end
    // the corner processor against the drawing
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[pid(11)][k] != pid(drawn[k])) begin
        failures++; $display("FAIL P11 neighbour %0d is %0d, drawn P%0d", k, seen[pid(11)][k], drawn[k]);
      end
    end
    // everyone against the torus
    for (int p = 0; p < NPR; p++) begin
      int dr [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};
      int dc [8] = '{0, 1, 1, 1, 0, -1, -1, -1};
      for (int k = 0; k < 8; k++) begin
        int q;
        q = ((p / C + dr[k] + R) % R) * C + (p % C + dc[k] + C) % C;
        checks++;
        if (seen[p][k] != q) begin failures++; $display("FAIL p=%0d k=%0d saw %0d", p, k, seen[p][k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
