// tb_sequencer: random programs on one sequencer, compared clock by clock
// with an instruction-level reference model.
//
// Each round loads a random program (64 words, the first three of them
// operand reads so the XOR window is filled, END at the last word), resets
// the sequencer and runs it twice through. The testbench plays the address
// counter: it steps pc and returns it to 0 when end_instr is seen. IN and NP
// inputs change randomly every clock. The model keeps its own data memory,
// AND register, three-operand XOR window, output buffer and output bits;
// after every clock np_out and out_bits must match, and end_instr must
// appear exactly at the END word.
module tb_sequencer;
  import prus_pkg::*;

  localparam int PM = 64;
  localparam int ROUNDS = 60;

  logic clk = 0, rst, pm_we;
  logic [5:0] pc, pm_waddr;
  instr_t pm_wdata;
  logic [7:0] in_bits, np_in;
  logic np_out, end_instr;
  logic [15:0] out_bits;

  sequencer #(.PM_DEPTH(PM)) dut (
    .clk, .rst, .pc, .pm_we, .pm_waddr, .pm_wdata, .in_bits, .np_in,
    .np_out, .out_bits, .end_instr
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rd = 0, n_ext = 0, n_wr_dm = 0, n_wr_out = 0, n_pass = 0, n_noop = 0;

  instr_t prog [PM];
  // reference state
  logic       m_dm [1024];
  logic       m_and, m_ob;
  logic [2:0] m_sr;
  logic [15:0] m_out;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] rnd_addr();
    // mostly a small DM window so reads hit written bits, sometimes external
    case ($urandom % 4)
      0: return {6'h3F, 4'($urandom)};
      default: return 10'($urandom % 16);
    endcase
  endfunction

  function automatic instr_t rnd_instr(int i);
    if (i < 3) return i_read(i == 0, 1'($urandom), rnd_addr());
    case ($urandom % 10)
      0, 1, 2, 3: return i_read(($urandom % 3) == 0, 1'($urandom), rnd_addr());
      4:          return i_write(SBP_ANDT, rnd_addr());
      5:          return i_write(SBP_ANDI, rnd_addr());
      6:          return i_write(SBP_XORB, rnd_addr());
      7:          return i_write(SBP_PASS, rnd_addr());
      8:          return I_NOOP;
      default:    return i_write(SBP_XORB, {6'h3F, 4'($urandom)});
    endcase
  endfunction

  // one instruction of the reference model
  task automatic model_step(input instr_t w, output logic is_end);
    logic ext, src, res;
    ext = (w[9:4] == 6'h3F);
    if (ext) src = w[3] ? np_in[w[2:0]] : in_bits[w[2:0]];
    else     src = m_dm[w[9:0]];
    is_end = 0;
    if (!w[11]) begin
      logic o = src ^ w[10];
      m_and = (w[12] ? 1'b1 : m_and) & o;
      m_sr  = {m_sr[1:0], o};
      n_rd++;
      if (ext) n_ext++;
    end else if (w[12:10] == 3'b111 && w[9:4] == 6'h3E) begin
      is_end = w[0];
      if (!w[0]) n_noop++;
    end else begin
      case (w[12:10])
        3'b010:  res = m_and;
        3'b011:  res = !m_and;
        3'b110:  res = ^m_sr;
        default: res = src;
      endcase
      m_ob = res;
      if (w[12:10] == 3'b111) n_pass++;
      else if (ext) begin m_out[w[3:0]] = res; n_wr_out++; end
      else begin m_dm[w[9:0]] = res; n_wr_dm++; end
    end
  endtask

  initial begin
    logic e;
    pm_we = 0; pm_waddr = 0; pm_wdata = '0; pc = 0; in_bits = 0; np_in = 0;
    rst = 1;
    for (int round = 0; round < ROUNDS; round++) begin
      for (int i = 0; i < PM - 1; i++) prog[i] = rnd_instr(i);
      prog[PM-1] = I_END;
      rst = 0;
      for (int i = 0; i < PM; i++) begin
        @(negedge clk);
        pm_we = 1; pm_waddr = 6'(i); pm_wdata = prog[i];
      end
      @(negedge clk) pm_we = 0; rst = 1;
      @(negedge clk) rst = 0; pc = 0;
      for (int a = 0; a < 1024; a++) m_dm[a] = 0;
      m_and = 1; m_ob = 0; m_out = '0; m_sr = '0;
      for (int pass = 0; pass < 2; pass++)
        for (int i = 0; i < PM; i++) begin
          in_bits = 8'($urandom); np_in = 8'($urandom);
          #1;
          model_step(prog[pc], e);
          checks++;
          if (end_instr !== e) begin failures++; $display("FAIL end_instr pc=%0d", pc); end
          @(posedge clk);
          @(negedge clk);
          pc = end_instr ? 6'd0 : pc + 6'd1;
          // XOR window is valid once the first three reads are done
          checks++;
          if (np_out !== m_ob || out_bits !== m_out) begin
            failures++;
            $display("FAIL round %0d pc %0d instr %h: ob %b/%b out %h/%h",
                     round, i, prog[i], np_out, m_ob, out_bits, m_out);
          end
        end
    end
    $display("reads=%0d ext_reads=%0d dm_writes=%0d out_writes=%0d pass=%0d noop=%0d",
             n_rd, n_ext, n_wr_dm, n_wr_out, n_pass, n_noop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
