// tb_instr_decoder: checks the decoder against a bit-level reference for
// random and hand-picked instruction words.
module tb_instr_decoder;
  import prus_pkg::*;

  instr_t instr;
  ctl_t   ctl;
  int checks = 0, failures = 0;

  instr_decoder dut (.instr, .ctl);

  task automatic check_one(input instr_t w);
    logic rd, ext, spec, pass;
    logic e_op, e_init, e_mux, e_dm, e_od, e_ob, e_end, e_noop;
    instr = w;
    #1;
    rd   = (w[11] == 1'b0);
    ext  = (w[9:4] == 6'b111111);
    pass = (w[12:10] == 3'b111);
    spec = pass && (w[9:4] == 6'b111110);
    e_op   = rd;
    e_init = rd && w[12];
    e_mux  = (rd || (pass && !spec)) && ext;
    e_dm   = !rd && !pass && !ext;
    e_od   = !rd && !pass && ext;
    e_ob   = !rd && !spec;
    e_end  = spec && w[0];
    e_noop = spec && !w[0];
    checks++;
    if (ctl.op_en !== e_op || ctl.init !== e_init || ctl.mux_en !== e_mux ||
        ctl.dm_we !== e_dm || ctl.out_dec_en !== e_od || ctl.ob_load !== e_ob ||
        ctl.end_instr !== e_end || ctl.noop !== e_noop ||
        ctl.sbp_sel !== w[12:10] || ctl.inv !== w[10]) begin
      failures++;
      $display("FAIL instr=%h ctl=%p", w, ctl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(I_NOOP);
    check_one(I_END);
    check_one(i_read(1'b1, 1'b0, a_in(3)));
    check_one(i_read(1'b0, 1'b1, a_np(7)));
    check_one(i_read(1'b0, 1'b0, 10'd5));
    check_one(i_write(SBP_ANDT, 10'd17));
    check_one(i_write(SBP_ANDI, a_out(2)));
    check_one(i_write(SBP_XORB, 10'd1000));
    check_one(i_write(SBP_PASS, a_np(1)));
    for (int i = 0; i < 4000; i++) check_one(instr_t'($urandom));
    // specials on every low nibble
    for (int k = 0; k < 16; k++) check_one({SBP_PASS, SPEC_PAGE, 4'(k)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
