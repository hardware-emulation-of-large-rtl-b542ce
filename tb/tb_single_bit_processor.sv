// tb_single_bit_processor: random RPN equations on the XOR variant and on the
// OR variant. The reference computes each equation's AND (and OR) over the
// operands since its init, and the XOR of the last three operands.
module tb_single_bit_processor;
  import prus_pkg::*;
  logic clk = 0, rst, op_en, init, inv, din;
  logic and_x, sec_x, and_o, sec_o;
  logic m_and, m_or;
  logic [2:0] m_sr;
  int n_ops, checks = 0, failures = 0;

  single_bit_processor #(.SECOND(SBP_XOR)) dut_x (
    .clk, .rst, .op_en, .init, .inv, .din, .and_out(and_x), .second_out(sec_x));
  single_bit_processor #(.SECOND(SBP_OR)) dut_o (
    .clk, .rst, .op_en, .init, .inv, .din, .and_out(and_o), .second_out(sec_o));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_en = 0; init = 0; inv = 0; din = 0;
    rst = 1; @(posedge clk); @(negedge clk) rst = 0;
    m_and = 1; m_or = 1; n_ops = 0;
    checks++;
    if (and_x !== 1'b1 || and_o !== 1'b1 || sec_o !== 1'b1) begin
      failures++; $display("FAIL reset values");
    end
    for (int eq = 0; eq < 1500; eq++) begin
      int len;
      len = 1 + $urandom % 6;
      for (int k = 0; k < len; k++) begin
        logic opnd;
        @(negedge clk);
        op_en = 1; init = (k == 0); inv = 1'($urandom); din = 1'($urandom);
        opnd = inv ^ din;
        @(posedge clk);
        m_and = (init ? 1'b1 : m_and) & opnd;
        m_or  = (init ? 1'b0 : m_or) | opnd;
        m_sr  = {m_sr[1:0], opnd};
        n_ops++;
        // an idle clock now and then must change nothing
        if ($urandom % 3 == 0) begin
          @(negedge clk); op_en = 0; init = 1'($urandom); din = 1'($urandom);
          @(posedge clk);
        end
      end
      @(negedge clk);
      op_en = 0;
      checks++;
      if (and_x !== m_and || and_o !== m_and || sec_o !== m_or) begin
        failures++; $display("FAIL eq %0d and=%b/%b or=%b/%b", eq, and_x, m_and, sec_o, m_or);
      end
      if (n_ops >= 3) begin
        checks++;
        if (sec_x !== ^m_sr) begin failures++; $display("FAIL eq %0d xor", eq); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
