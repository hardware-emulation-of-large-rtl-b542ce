// tb_address_counter: counting, holding while run is low, reset by END with
// a cycle_done pulse, and wrap-around, on a 16-word counter.
module tb_address_counter;
  localparam int DEPTH = 16;
  logic clk = 0, rst, run, end_instr, cycle_done;
  logic [3:0] pc;
  int model, checks = 0, failures = 0;

  address_counter #(.DEPTH(DEPTH)) dut (.clk, .rst, .run, .end_instr, .pc, .cycle_done);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; end_instr = 0;
    rst = 1; @(posedge clk); @(negedge clk) rst = 0; model = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      run = ($urandom % 8) != 0;
      end_instr = ($urandom % 11) == 0;
      #1;
      checks++;
      if (pc !== 4'(model) || cycle_done !== (run && end_instr)) begin
        failures++; $display("FAIL pc=%0d model=%0d", pc, model);
      end
      @(posedge clk);
      if (run) model = end_instr ? 0 : (model + 1) % DEPTH;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
