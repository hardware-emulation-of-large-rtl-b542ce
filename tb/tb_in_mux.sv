// tb_in_mux: random input vectors on every select value, both settings of
// mux_en.
module tb_in_mux;
  logic [3:0] sel;
  logic mux_en, dm_bit, y, exp_y;
  logic [7:0] in_bits, np_in;
  int checks = 0, failures = 0;

  in_mux dut (.sel, .mux_en, .in_bits, .np_in, .dm_bit, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      sel = 4'(i % 16); mux_en = 1'((i / 16) % 2);
      in_bits = 8'($urandom); np_in = 8'($urandom); dm_bit = 1'($urandom);
      #1;
      if (!mux_en)      exp_y = dm_bit;
      else if (sel < 8) exp_y = in_bits[sel];
      else              exp_y = np_in[sel - 8];
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL sel=%0d en=%0d", sel, mux_en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
