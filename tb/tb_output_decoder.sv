// tb_output_decoder: random writes to the 16 latched outputs; only the
// selected bit may change, and only when enabled.
module tb_output_decoder;
  logic clk = 0, rst, en, d;
  logic [3:0] sel;
  logic [15:0] out_bits, model;
  int checks = 0, failures = 0;

  output_decoder dut (.clk, .rst, .en, .sel, .d, .out_bits);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; d = 0; sel = 0;
    rst = 1; @(posedge clk); @(negedge clk) rst = 0; model = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (out_bits !== model) begin failures++; $display("FAIL %h/%h", out_bits, model); end
      en = 1'($urandom); sel = 4'($urandom); d = 1'($urandom);
      @(posedge clk);
      if (en) model[sel] = d;
    end
    @(negedge clk) rst = 1; en = 0; @(posedge clk); @(negedge clk) rst = 0;
    checks++;
    if (out_bits !== 16'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
