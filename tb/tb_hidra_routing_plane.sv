// Self-checking test of the routing plane. Four 6x6 planes, one per algorithm
// (HIDRA, RC, RT, RTC), get the same stimulus; the testbench plays the logic
// elements, holding each unit's 16-bit identifier in a rotating register.
//
// Scenarios and what they check:
//  A  target-started net, source at (0,0), target (0,4), and a decoy source
//     one identifier bit off next to the target: cycles 19+e with e = 4
//     (HIDRA, RC) or 1 (line search); the decoy stays unconnected.
//  B  second target of the same net at (3,3): e = 6 (HIDRA), 3 (RC starts
//     from the existing path), 2 (RT), 1 (RTC); configured multiplexers after
//     A+B: 12 for HIDRA, 9 for RC (path re-use).
//  C  data: the source's value reaches both targets through the switchboxes.
//  D  source-started net (5,1)->(5,5) with a second source of the same
//     identifier at (5,4), which must drop out.
//  E  two targets request in the same cycle: the lower one is served first.
//  F  target with no source: time-out after 1+16+1+EXP_LIMIT cycles, failed
//     and congestion set, cleared when the request is withdrawn.
// Cycle counts are counted from the clock edge that first sees the request to
// the one that sets the target's connected flag.
module tb_hidra_routing_plane;
  import hidra_pkg::*;
  localparam int NX = 6, NY = 6, NP = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  role_e [NY-1:0][NX-1:0] role;
  logic  [NY-1:0][NX-1:0] init, vin;
  logic  [15:0]           id_set [NY][NX];
  logic  [NY-1:0][NX-1:0] conn_a [NP];
  logic  [NY-1:0][NX-1:0] fail_a [NP];
  logic  [NY-1:0][NX-1:0] vout_a [NP];
  logic  [NP-1:0]         cong;
  int                     nmux   [NP];
  logic                   load;

  int checks = 0, failures = 0;
  int n_tgt_master = 0, n_src_master = 0, n_contention = 0, n_mismatch = 0,
      n_dup_drop = 0, n_reuse = 0, n_timeout = 0, n_data = 0, n_line = 0;

  for (genvar p = 0; p < NP; p++) begin : g_p
    logic [NY-1:0][NX-1:0] idb, sh, vo, cn, fl;
    logic [15:0] idr [NY][NX];
    logic [4:0]  cfgv [NY][NX];

    hidra_routing_plane #(.X(NX), .Y(NY), .ALGO(algo_e'(p))) u (
      .clk, .rst_n,
      .edge_val_in_n('0), .edge_val_in_s('0), .edge_val_out_n(), .edge_val_out_s(),
      .edge_prop_in_n('0), .edge_prop_in_s('0), .edge_prop_out_n(), .edge_prop_out_s(),
      .edge_val_in_e('0), .edge_val_in_w('0), .edge_val_out_e(), .edge_val_out_w(),
      .edge_prop_in_e('0), .edge_prop_in_w('0), .edge_prop_out_e(), .edge_prop_out_w(),
      .el_role(role), .el_init(init), .el_id_bit(idb), .el_id_shift(sh),
      .el_val_in(vin), .el_val_out(vo), .connected(cn), .failed(fl),
      .trigger(), .congestion(cong[p]), .state()
    );

    for (genvar y = 0; y < NY; y++) begin : g_y
      for (genvar x = 0; x < NX; x++) begin : g_x
        always_ff @(posedge clk)
          if (load) idr[y][x] <= id_set[y][x];
          else if (sh[y][x]) idr[y][x] <= {idr[y][x][14:0], idr[y][x][15]};
        assign idb[y][x] = idr[y][x][15];
        for (genvar d = 0; d < 5; d++) begin : g_d
          assign cfgv[y][x][d] = u.g_row[y].g_col[x].u_ru.u_ctrl.mux_q[d].cfg;
        end
      end
    end

    always_comb begin
      nmux[p] = 0;
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++)
          nmux[p] += $countones(cfgv[y][x]);
    end
    assign conn_a[p] = cn;
    assign fail_a[p] = fl;
    assign vout_a[p] = vo;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Wait until unit (y,x) is connected in every plane; return edge counts.
  task automatic wait_conn(input int y, input int x, output int cyc[NP]);
    bit done[NP];
    for (int p = 0; p < NP; p++) begin done[p] = 0; cyc[p] = -1; end
    for (int c = 1; c <= 400; c++) begin
      @(posedge clk); #1;
      for (int p = 0; p < NP; p++)
        if (!done[p] && conn_a[p][y][x]) begin done[p] = 1; cyc[p] = c; end
      if (done[0] && done[1] && done[2] && done[3]) break;
    end
  endtask

  task automatic expect_cycles(input int cyc[NP], input int e[NP], input string what);
    for (int p = 0; p < NP; p++)
      check(cyc[p] == 19 + e[p], $sformatf("%s alg %0d cycles %0d exp %0d", what, p, cyc[p], 19 + e[p]));
  endtask

  initial begin
    int cyc[NP], cyc2[NP];
    role = '0; init = '0; vin = '0; load = 0;
    for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) id_set[y][x] = '0;
    // nets
    role[0][0] = ROLE_SOURCE; id_set[0][0] = 16'hA5C3;
    role[4][0] = ROLE_TARGET; id_set[4][0] = 16'hA5C3;
    role[4][1] = ROLE_SOURCE; id_set[4][1] = 16'hA5C2;  // decoy, one bit off
    role[3][3] = ROLE_TARGET; id_set[3][3] = 16'hA5C3;
    role[1][5] = ROLE_SOURCE; id_set[1][5] = 16'h1234;
    role[4][5] = ROLE_SOURCE; id_set[4][5] = 16'h1234;  // duplicate source
    role[5][5] = ROLE_TARGET; id_set[5][5] = 16'h1234;
    role[5][1] = ROLE_SOURCE; id_set[5][1] = 16'h0F0F;
    role[5][3] = ROLE_TARGET; id_set[5][3] = 16'h0F0F;
    role[2][4] = ROLE_SOURCE; id_set[2][4] = 16'h5555;
    role[3][4] = ROLE_TARGET; id_set[3][4] = 16'h5555;
    role[2][2] = ROLE_TARGET; id_set[2][2] = 16'h7777;  // no source
    load = 1;
    repeat (3) @(posedge clk);
    #1; load = 0; rst_n = 1;
    repeat (2) @(posedge clk);
    #1;

    // A: target-started
    init[4][0] = 1;
    wait_conn(4, 0, cyc);
    expect_cycles(cyc, '{4, 4, 1, 1}, "A");
    for (int p = 0; p < NP; p++) begin
      check(conn_a[p][0][0] && !conn_a[p][4][1], "A source connected, decoy not");
      if (conn_a[p][0][0] && !conn_a[p][4][1]) n_mismatch++;
    end
    n_tgt_master++;
    if (cyc[2] < cyc[0]) n_line++;

    // B: second target of the same source
    #1; init[4][0] = 0; init[3][3] = 1;
    wait_conn(3, 3, cyc);
    expect_cycles(cyc, '{6, 3, 2, 1}, "B");
    check(nmux[0] == 12, $sformatf("B HIDRA muxes %0d", nmux[0]));
    check(nmux[1] == 9, $sformatf("B RC muxes %0d", nmux[1]));
    if (nmux[1] < nmux[0]) n_reuse++;

    // C: data through the created paths
    #1; init[3][3] = 0;
    @(posedge clk); #1;
    for (int v = 1; v >= 0; v--) begin
      vin[0][0] = 1'(v);
      #1;
      for (int p = 0; p < NP; p++) begin
        check(vout_a[p][4][0] == 1'(v) && vout_a[p][3][3] == 1'(v), $sformatf("C data alg %0d", p));
        check(vout_a[p][2][2] == 1'b0, "C no data at unconnected unit");
        n_data++;
      end
    end

    // D: source-started, duplicate source must drop out
    init[1][5] = 1;
    wait_conn(5, 5, cyc);
    expect_cycles(cyc, '{4, 4, 1, 1}, "D");
    n_src_master++;
    vin[1][5] = 1; vin[4][5] = 0;
    #1;
    for (int p = 0; p < NP; p++) begin
      check(conn_a[p][1][5] && !conn_a[p][4][5], $sformatf("D duplicate dropped alg %0d", p));
      check(vout_a[p][5][5] == 1'b1, $sformatf("D data alg %0d", p));
      if (!conn_a[p][4][5]) n_dup_drop++;
    end
    vin[1][5] = 0;
    init[1][5] = 0;

    // E: contention, two targets start together
    @(posedge clk); #1;
    init[5][3] = 1; init[3][4] = 1;
    fork
      wait_conn(5, 3, cyc);
      wait_conn(3, 4, cyc2);
    join
    for (int p = 0; p < NP; p++) begin
      check(cyc2[p] > 0 && cyc[p] > cyc2[p], $sformatf("E lower first alg %0d: %0d %0d", p, cyc2[p], cyc[p]));
      if (cyc2[p] > 0 && cyc[p] > cyc2[p]) n_contention++;
    end
    init[5][3] = 0; init[3][4] = 0;

    // F: no source, time-out
    @(posedge clk); #1;
    init[2][2] = 1;
    begin
      int c;
      for (c = 1; c <= 200; c++) begin
        @(posedge clk); #1;
        if (fail_a[0][2][2]) break;
      end
      check(c == 1 + 16 + 1 + NX * NY, $sformatf("F time-out after %0d", c));
    end
    for (int p = 0; p < NP; p++) begin
      check(fail_a[p][2][2] && cong[p] && !conn_a[p][2][2], $sformatf("F flag alg %0d", p));
      if (cong[p]) n_timeout++;
    end
    repeat (5) @(posedge clk); #1;
    check(fail_a[0][2][2], "F no retry while requested");
    init[2][2] = 0;
    repeat (2) @(posedge clk); #1;
    for (int p = 0; p < NP; p++) check(!cong[p], "F flag cleared");

    // every mechanism must have happened
    check(n_tgt_master > 0, "target master");
    check(n_src_master > 0, "source master");
    check(n_contention > 0, "contention");
    check(n_mismatch > 0, "id mismatch");
    check(n_dup_drop > 0, "duplicate drop");
    check(n_reuse > 0, "path re-use");
    check(n_timeout > 0, "time-out");
    check(n_data > 0, "data");
    check(n_line > 0, "line search");
    $display("mechanisms: tgt_master=%0d src_master=%0d contention=%0d mismatch=%0d dup_drop=%0d reuse=%0d timeout=%0d data=%0d line=%0d",
             n_tgt_master, n_src_master, n_contention, n_mismatch, n_dup_drop, n_reuse, n_timeout, n_data, n_line);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
