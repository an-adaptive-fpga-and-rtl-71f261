// End-to-end test of the fabric, reduced to 4x4 routing units and 8x8
// molecules (tb_poetic_fabric_full runs the same test at the default size). The whole configuration is loaded through the serial
// chain, then the routing units build the nets on their own:
//   net 2: source molecule (2,0) starts (source master), target (0,4) waits;
//          3 hops, 19+3 cycles.
//   dead:  target molecule (7,0) whose source does not exist starts; it
//          times out after 1+16+1+16 cycles and raises congestion.
//   net 1: target molecule (7,4) starts (target master), source (0,0)
//          waits; 5 hops, 19+5 cycles.
// All three request at once, so the election serves them bottom-left first:
// net 2 (row 0, x=1), the dead target (row 0, x=3), then net 1 (row 2).
// Data: the south edge line of molecule (1,0) goes through that molecule, a
// LUT4 inverter, into source molecule (0,0), across the routing plane to
// target molecule (7,4), which drives east edge line 0 of its row. Net 2
// carries the south edge line of molecule (2,0) to the west edge line of
// molecule (0,4). Every mechanism used is counted and must occur.
module tb_poetic_fabric;
  import hidra_pkg::*;
  localparam int X = 4, Y = 4, MX = 2 * X, MY = 2 * Y;
  localparam int LIMIT = X * Y;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_en, cfg_in, cfg_out, congestion;
  logic [MX-1:0][1:0] in_n, in_s, out_n, out_s;
  logic [MY-1:0][1:0] in_e, in_w, out_e, out_w;
  logic [Y-1:0][X-1:0] connected, failed;
  ru_state_e state;

  poetic_fabric #(.X(X), .Y(Y)) dut (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out,
    .mol_in_n(in_n), .mol_in_s(in_s), .mol_out_n(out_n), .mol_out_s(out_s),
    .mol_in_e(in_e), .mol_in_w(in_w), .mol_out_e(out_e), .mol_out_w(out_w),
    .rt_val_in_n('0), .rt_val_in_s('0), .rt_prop_in_n('0), .rt_prop_in_s('0),
    .rt_val_out_n(), .rt_val_out_s(), .rt_prop_out_n(), .rt_prop_out_s(),
    .rt_val_in_e('0), .rt_val_in_w('0), .rt_prop_in_e('0), .rt_prop_in_w('0),
    .rt_val_out_e(), .rt_val_out_w(), .rt_prop_out_e(), .rt_prop_out_w(),
    .connected, .failed, .congestion, .state
  );

  mol_cfg_t cfgs [MY*MX];
  int checks = 0, failures = 0;
  int n_cfg = 0, n_elect = 0, n_src_master = 0, n_tgt_master = 0, n_timeout = 0,
      n_data = 0, n_lut = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int idx(input int mx, input int my);
    return my * MX + mx;
  endfunction

  initial begin
    int c, t_net2, t_dead, t_net1;
    mol_cfg_t m;
    cfg_en = 0; cfg_in = 0; in_n = '0; in_s = '0; in_e = '0; in_w = '0;
    for (int i = 0; i < MY * MX; i++) cfgs[i] = '0;

    // net 1: inverter (1,0) -> source (0,0) ... target (39,20) -> east edge
    m = '0; m.mode = MOL_LUT4; m.lut = 16'h5555; m.in_sel[0] = 3'(DIR_S * 2);
    m.sb_sel[DIR_W * 2] = 3'd6;
    cfgs[idx(1, 0)] = m;
    m = '0; m.mode = MOL_ROUTE_OUT; m.lut = 16'hC0DE; m.in_sel[0] = 3'(DIR_E * 2);
    cfgs[idx(0, 0)] = m;
    m = '0; m.mode = MOL_ROUTE_IN; m.lut = 16'hC0DE; m.init = 1;
    m.sb_sel[DIR_E * 2] = 3'd6;
    cfgs[idx(MX - 1, MY / 2)] = m;
    // net 2: source (2,0) fed from the south edge -> target (0,4) -> west edge
    m = '0; m.mode = MOL_ROUTE_OUT; m.lut = 16'h0BAD; m.init = 1; m.in_sel[0] = 3'(DIR_S * 2);
    cfgs[idx(2, 0)] = m;
    m = '0; m.mode = MOL_ROUTE_IN; m.lut = 16'h0BAD; m.sb_sel[DIR_W * 2] = 3'd6;
    cfgs[idx(0, 4)] = m;
    // dead: target without a source
    m = '0; m.mode = MOL_ROUTE_IN; m.lut = 16'hDEAD; m.init = 1;
    cfgs[idx(MX - 1, 0)] = m;

    repeat (2) @(posedge clk); #1; rst_n = 1;

    // ---- configuration through the chain, last molecule first
    cfg_en = 1;
    for (int i = MY * MX - 1; i >= 0; i--)
      for (int b = MOL_CFG_W - 1; b >= 0; b--) begin
        cfg_in = cfgs[i][b];
        @(posedge clk); #1;
      end
    cfg_en = 0;
    check(dut.g_mrow[0].g_mcol[1].u_mol.cfg_q == cfgs[idx(1, 0)], "inverter configured");
    check(dut.g_mrow[MY/2].g_mcol[MX-1].u_mol.cfg_q == cfgs[idx(MX - 1, MY / 2)], "target configured");
    n_cfg++;

    // ---- routing runs by itself from here
    t_net2 = -1; t_dead = -1; t_net1 = -1;
    for (c = 1; c <= 2000; c++) begin
      @(posedge clk); #1;
      if (t_net2 < 0 && connected[2][0])       t_net2 = c;
      if (t_dead < 0 && failed[0][X-1])        t_dead = c;
      if (t_net1 < 0 && connected[Y/2][X-1])   t_net1 = c;
      if (t_net1 > 0) break;
    end
    check(t_net2 == 19 + 3, $sformatf("net 2 after %0d cycles", t_net2));
    check(t_dead == t_net2 + 1 + 16 + 1 + LIMIT, $sformatf("time-out at %0d", t_dead));
    check(t_net1 == t_dead + 19 + (X - 1) + Y / 2, $sformatf("net 1 at %0d", t_net1));
    if (t_net2 > 0 && t_net2 < t_dead && t_dead < t_net1) n_elect++;
    if (connected[0][1] && connected[2][0]) n_src_master++;
    if (connected[0][0] && connected[Y/2][X-1]) n_tgt_master++;
    check(congestion && failed[0][X-1] && !connected[0][X-1], "congestion flagged");
    if (congestion) n_timeout++;
    check(connected[0][0] && connected[0][1] && connected[2][0] && connected[Y/2][X-1], "all ends connected");

    // ---- data through both nets
    for (int v = 0; v < 6; v++) begin
      in_s[1][0] = 1'(v % 2);
      in_s[2][0] = 1'((v / 2) % 2);
      #1;
      check(out_e[MY/2][0] == ~in_s[1][0], "net 1 carries the inverted edge input");
      check(out_w[4][0] == in_s[2][0], "net 2 carries the edge input");
      if (out_e[MY/2][0] == ~in_s[1][0]) n_lut++;
      if (out_w[4][0] == in_s[2][0]) n_data++;
      @(posedge clk); #1;
    end

    check(n_cfg > 0 && n_elect > 0 && n_src_master > 0 && n_tgt_master > 0 &&
          n_timeout > 0 && n_data > 0 && n_lut > 0, "every mechanism occurred");
    $display("mechanisms: config=%0d election=%0d src_master=%0d tgt_master=%0d timeout=%0d data=%0d lut=%0d",
             n_cfg, n_elect, n_src_master, n_tgt_master, n_timeout, n_data, n_lut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MY * MX * MOL_CFG_W + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
