// tb_program_memory: writes random words at random addresses of the full
// 2048-word memory, then reads every written address back through the
// asynchronous read port.
module tb_program_memory;
  localparam int DEPTH = 2048;
  logic clk = 0;
  logic [10:0] raddr, waddr;
  logic [12:0] rdata, wdata;
  logic we;
  logic [12:0] model [DEPTH];
  bit          valid [DEPTH];
  int checks = 0, failures = 0;

  program_memory dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) valid[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1; waddr = 11'($urandom); wdata = 13'($urandom);
      // read the same address during the write: old contents until the edge
      raddr = waddr;
      #1;
      if (valid[waddr]) begin
        checks++;
        if (rdata !== model[waddr]) begin failures++; $display("FAIL pre-write %0d", waddr); end
      end
      @(posedge clk);
      model[waddr] = wdata; valid[waddr] = 1;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 11'(a);
      #1;
      if (valid[a]) begin
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d %h/%h", a, rdata, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
