// Self-checking test of the molecule/routing-unit interface: random roles and
// signals on the four molecules; the first molecule in a route mode must be
// the one connected, and only it may receive the shift and the data value.
module tb_hidra_interface;
  import hidra_pkg::*;
  role_e [3:0] mr;
  logic  [3:0] mi, mb, msh, mv, mvi;
  role_e er;
  logic ei, eb, esh, evi, evo;
  int checks = 0, failures = 0;
  int k;

  hidra_interface dut (.m_role(mr), .m_init(mi), .m_id_bit(mb), .m_id_shift(msh),
                       .m_val(mv), .m_val_in(mvi), .el_role(er), .el_init(ei),
                       .el_id_bit(eb), .el_id_shift(esh), .el_val_in(evi), .el_val_out(evo));

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 4; i++) mr[i] = role_e'($urandom_range(0, 2));
      if (t % 5 == 0) mr = '0;
      mi = 4'($urandom); mb = 4'($urandom); mv = 4'($urandom);
      esh = 1'($urandom); evo = 1'($urandom);
      #1;
      k = -1;
      for (int i = 3; i >= 0; i--) if (mr[i] != ROLE_NONE) k = i;
      checks += 4;
      if (k < 0) begin
        if (er != ROLE_NONE || ei || eb || evi) failures++;
        if (msh != 0) failures++;
        if (mvi != 0) failures++;
        checks--;
      end else begin
        if (er != mr[k] || ei != mi[k] || eb != mb[k] || evi != mv[k]) failures++;
        if (msh != (4'(esh) << k)) failures++;
        if (mvi != (4'(evo) << k)) failures++;
        if ($countones(msh | mvi) > 1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
