// Self-checking test of the molecule. Each configuration word is shifted in
// through the serial chain; the word shifted out on cfg_out must be the
// previous one. Then: LUT4 mode, combinational and registered, against the
// truth table; all 8 switch box outputs against the selection rule for random
// selects; shift-register mode (delay of 16 cycles); route-out mode (role,
// routed value, identifier read MSB first and restored after 16 shifts);
// route-in mode (output follows the routing plane).
module tb_poetic_molecule;
  import hidra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_en, cfg_in, cfg_out, rt_init, rt_id_bit, rt_id_shift, rt_val, rt_val_in, mol_out;
  logic [7:0] sw_in, sw_out;
  role_e rt_role;
  mol_cfg_t cur, prev;
  int checks = 0, failures = 0;

  poetic_molecule dut (.clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .sw_in, .sw_out,
    .rt_role, .rt_init, .rt_id_bit, .rt_id_shift, .rt_val, .rt_val_in, .mol_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic configure(input mol_cfg_t c);
    mol_cfg_t got;
    cfg_en = 1;
    for (int i = MOL_CFG_W - 1; i >= 0; i--) begin
      cfg_in = c[i];
      #1; got[i] = cfg_out;
      @(posedge clk); #1;
    end
    cfg_en = 0;
    check(got == prev, $sformatf("chain shifts out the previous word %h %h", got, prev));
    prev = c;
  endtask

  function automatic logic sb_ref(input mol_cfg_t c, input int o, input logic [7:0] in, input logic m);
    int d = o / 2, s = int'(c.sb_sel[o]), others[3], n = 0;
    for (int k = 0; k < 4; k++) if (k != d) begin others[n] = k; n++; end
    if (s < 6) return in[others[s / 2] * 2 + s % 2];
    if (s == 6) return m;
    return 1'b0;
  endfunction

  initial begin
    logic exp_v;
    logic [15:0] hist;
    cfg_en = 0; cfg_in = 0; sw_in = 0; rt_id_shift = 0; rt_val_in = 0; prev = '0;
    repeat (2) @(posedge clk); #1; rst_n = 1;

    // LUT4, combinational, random switch box
    for (int t = 0; t < 6; t++) begin
      cur = '0;
      cur.mode = MOL_LUT4;
      cur.lut = 16'($urandom);
      for (int i = 0; i < 4; i++) cur.in_sel[i] = 3'($urandom);
      for (int o = 0; o < 8; o++) cur.sb_sel[o] = 3'($urandom);
      cur.seq = (t % 2);
      configure(cur);
      check(rt_role == ROLE_NONE && !rt_init, "LUT4 has no routing role");
      for (int v = 0; v < 40; v++) begin
        sw_in = 8'($urandom);
        #1;
        exp_v = cur.lut[{sw_in[cur.in_sel[3]], sw_in[cur.in_sel[2]], sw_in[cur.in_sel[1]], sw_in[cur.in_sel[0]]}];
        if (!cur.seq) check(mol_out == exp_v, "LUT4 output");
        for (int o = 0; o < 8; o++) check(sw_out[o] == sb_ref(cur, o, sw_in, mol_out), $sformatf("switch box out %0d", o));
        @(posedge clk); #1;
        if (cur.seq) check(mol_out == exp_v, "LUT4 registered output");
      end
    end

    // shift register fed by line 5
    cur = '0; cur.mode = MOL_SHIFT; cur.in_sel[0] = 3'd5;
    configure(cur);
    hist = '0;
    for (int t = 0; t < 64; t++) begin
      sw_in = 8'($urandom);
      #1;
      if (t >= 16) check(mol_out == hist[15], "shift register delay 16");
      hist = {hist[14:0], sw_in[5]};
      @(posedge clk); #1;
    end

    prev.lut = hist;  // the shift register's contents are part of the word

    // route out: net source
    cur = '0; cur.mode = MOL_ROUTE_OUT; cur.in_sel[0] = 3'd2; cur.init = 1; cur.lut = 16'hA50F;
    configure(cur);
    #1; check(rt_role == ROLE_SOURCE && rt_init, "route out role");
    for (int v = 0; v < 8; v++) begin
      sw_in = 8'($urandom); #1;
      check(rt_val == sw_in[2], "routed value is LUT input 0");
    end
    @(posedge clk); #1;
    for (int r = 0; r < 2; r++)
      for (int i = 15; i >= 0; i--) begin
        rt_id_shift = 1; #1;
        check(rt_id_bit == cur.lut[i], $sformatf("identifier MSB first i=%0d got %b lut %h", i, rt_id_bit, dut.cfg_q.lut));
        @(posedge clk); #1;
      end
    rt_id_shift = 0;
    check(dut.cfg_q.lut == 16'hA50F, "identifier restored");

    // route in: net target
    cur = '0; cur.mode = MOL_ROUTE_IN; cur.init = 0; cur.lut = 16'h1234;
    cur.sb_sel[2] = 3'd6;  // east line 0 carries the molecule output
    configure(cur);
    check(rt_role == ROLE_TARGET && !rt_init, "route in role, waiting");
    for (int v = 0; v < 8; v++) begin
      rt_val_in = 1'(v % 2); #1;
      check(mol_out == rt_val_in && sw_out[2] == rt_val_in, "output follows routing plane");
    end
    @(posedge clk); #1;
    configure('0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
