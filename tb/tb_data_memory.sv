// tb_data_memory: checks reset clearing, synchronous write and asynchronous
// read of the 1024-bit data memory against a reference array.
module tb_data_memory;
  logic clk = 0, rst, we, wdata, rdata;
  logic [9:0] addr;
  logic model [1024];
  int checks = 0, failures = 0;

  data_memory dut (.clk, .rst, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 0; addr = 10'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d", a); end
    end
  endtask

  initial begin
    we = 0; wdata = 0; addr = 0;
    rst = 1; @(posedge clk); @(negedge clk) rst = 0;
    for (int a = 0; a < 1024; a++) model[a] = 0;
    sweep();
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      addr = 10'($urandom); we = 1'($urandom); wdata = 1'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL rd %0d", addr); end
      @(posedge clk);
      if (we) model[addr] = wdata;
    end
    sweep();
    @(negedge clk) rst = 1; @(posedge clk); @(negedge clk) rst = 0;
    for (int a = 0; a < 1024; a++) model[a] = 0;
    sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
