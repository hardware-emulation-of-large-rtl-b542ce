// tb_sbp_mux: all select codes against all input combinations.
module tb_sbp_mux;
  logic [2:0] sel;
  logic and_q, xor_q, mux_d, y, e;
  int checks = 0, failures = 0;

  sbp_mux dut (.sel, .and_q, .xor_q, .mux_d, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int v = 0; v < 8; v++) begin
        sel = 3'(s); {and_q, xor_q, mux_d} = 3'(v);
        #1;
        case (s)
          2: e = and_q;
          3: e = ~and_q;
          6: e = xor_q;
          7: e = mux_d;
          default: e = 0;
        endcase
        checks++;
        if (y !== e) begin failures++; $display("FAIL sel=%0d v=%0d", s, v); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
