// tb_output_buffer: random loads; the output must hold between loads and
// change one clock after a load.
module tb_output_buffer;
  logic clk = 0, rst, load, d, np_out, model;
  int checks = 0, failures = 0;

  output_buffer dut (.clk, .rst, .load, .d, .np_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; d = 0;
    rst = 1; @(posedge clk); @(negedge clk) rst = 0; model = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (np_out !== model) begin failures++; $display("FAIL cycle %0d", i); end
      load = ($urandom % 4) == 0; d = 1'($urandom);
      @(posedge clk);
      if (load) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
