// Self-checking test of the 8-neighbour (Moore) routing plane. Three 6x6
// planes get the same stimulus: plane 0 is 4-neighbour HIDRA for comparison,
// plane 1 is 8-neighbour HIDRA, plane 2 is 8-neighbour HIDRA-RC. The
// testbench plays the logic elements with rotating 16-bit identifiers.
//
// Scenarios and what they check:
//  A  target (4,4) of a source at (0,0): e = 8 with 4 neighbours, e = 4 along
//     the diagonal with 8; the 8-neighbour path uses 5 multiplexers.
//  B  second target (4,1) of the same net: e = 4 for 8-neighbour HIDRA, e = 2
//     for RC, which starts from the diagonal tree. Both add only 3
//     multiplexers: HIDRA's wave also follows the existing diagonal, because
//     a configured multiplexer that selects the unit's origin may be re-used.
//  C  data from the source reaches both targets in every plane.
//  D  target (2,4) with no source: time-out after 1+16+1+36 cycles.
// Cycle counts run from the clock edge that first sees the request to the one
// that sets the target's connected flag (19 + e). Coordinates are (y,x).
module tb_hidra_routing_plane_n8;
  import hidra_pkg::*;
  localparam int NX = 6, NY = 6, NP = 3;
  localparam int    P_NB  [NP] = '{4, 8, 8};
  localparam algo_e P_ALG [NP] = '{ALG_HIDRA, ALG_HIDRA, ALG_RC};

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
  int n_diag = 0, n_reuse = 0, n_data = 0, n_timeout = 0;

  for (genvar p = 0; p < NP; p++) begin : g_p
    logic [NY-1:0][NX-1:0] idb, sh, vo, cn, fl;
    logic [15:0] idr [NY][NX];
    logic [8:0]  cfgv [NY][NX];

    hidra_routing_plane #(.X(NX), .Y(NY), .ALGO(P_ALG[p]), .NB(P_NB[p])) u (
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
        for (genvar d = 0; d < 9; d++) begin : g_d
          if (d <= P_NB[p]) begin : g_m
            assign cfgv[y][x][d] = u.g_row[y].g_col[x].u_ru.u_ctrl.mux_q[d].cfg;
          end else begin : g_z
            assign cfgv[y][x][d] = 1'b0;
          end
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

  task automatic wait_conn(input int y, input int x, output int cyc[NP]);
    bit done[NP];
    for (int p = 0; p < NP; p++) begin done[p] = 0; cyc[p] = -1; end
    for (int c = 1; c <= 400; c++) begin
      @(posedge clk); #1;
      for (int p = 0; p < NP; p++)
        if (!done[p] && conn_a[p][y][x]) begin done[p] = 1; cyc[p] = c; end
      if (done[0] && done[1] && done[2]) break;
    end
  endtask

  initial begin
    int cyc[NP];
    int mux_a[NP];
    role = '0; init = '0; vin = '0; load = 0;
    for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) id_set[y][x] = '0;
    role[0][0] = ROLE_SOURCE; id_set[0][0] = 16'hC0DE;
    role[4][4] = ROLE_TARGET; id_set[4][4] = 16'hC0DE;
    role[4][1] = ROLE_TARGET; id_set[4][1] = 16'hC0DE;
    role[2][4] = ROLE_TARGET; id_set[2][4] = 16'h7777;  // no source
    load = 1;
    repeat (3) @(posedge clk);
    #1; load = 0; rst_n = 1;
    repeat (2) @(posedge clk);
    #1;

    // A: diagonal target
    init[4][4] = 1;
    wait_conn(4, 4, cyc);
    check(cyc[0] == 19 + 8, $sformatf("A 4-nb cycles %0d", cyc[0]));
    check(cyc[1] == 19 + 4, $sformatf("A 8-nb cycles %0d", cyc[1]));
    check(cyc[2] == 19 + 4, $sformatf("A 8-nb RC cycles %0d", cyc[2]));
    check(nmux[1] == 5 && nmux[2] == 5, $sformatf("A 8-nb muxes %0d %0d", nmux[1], nmux[2]));
    check(nmux[0] == 9, $sformatf("A 4-nb muxes %0d", nmux[0]));
    if (cyc[1] < cyc[0]) n_diag++;
    for (int p = 0; p < NP; p++) begin
      mux_a[p] = nmux[p];
      check(conn_a[p][0][0], $sformatf("A source connected plane %0d", p));
    end

    // B: second target, RC joins the tree
    #1; init[4][4] = 0; init[4][1] = 1;
    wait_conn(4, 1, cyc);
    check(cyc[1] == 19 + 4, $sformatf("B 8-nb cycles %0d", cyc[1]));
    check(cyc[2] == 19 + 2, $sformatf("B 8-nb RC cycles %0d", cyc[2]));
    check(cyc[0] >= 19 + 5, $sformatf("B 4-nb cycles %0d", cyc[0]));
    check(nmux[2] - mux_a[2] == 3, $sformatf("B RC added %0d muxes", nmux[2] - mux_a[2]));
    check(nmux[1] - mux_a[1] == 3, $sformatf("B 8-nb added %0d muxes", nmux[1] - mux_a[1]));
    if (nmux[2] - mux_a[2] == 3 && cyc[2] < cyc[1]) n_reuse++;

    // C: data
    #1; init[4][1] = 0;
    @(posedge clk); #1;
    for (int v = 1; v >= 0; v--) begin
      vin[0][0] = 1'(v);
      #1;
      for (int p = 0; p < NP; p++) begin
        check(vout_a[p][4][4] == 1'(v) && vout_a[p][4][1] == 1'(v), $sformatf("C data plane %0d", p));
        check(vout_a[p][2][4] == 1'b0, "C no data at unconnected unit");
        n_data++;
      end
    end

    // D: time-out
    init[2][4] = 1;
    begin
      int c;
      for (c = 1; c <= 200; c++) begin
        @(posedge clk); #1;
        if (fail_a[1][2][4]) break;
      end
      check(c == 1 + 16 + 1 + NX * NY, $sformatf("D time-out after %0d", c));
    end
    for (int p = 0; p < NP; p++) begin
      check(fail_a[p][2][4] && cong[p] && !conn_a[p][2][4], $sformatf("D flag plane %0d", p));
      if (cong[p]) n_timeout++;
    end
    init[2][4] = 0;
    repeat (2) @(posedge clk); #1;
    for (int p = 0; p < NP; p++) check(!cong[p], "D flag cleared");

    check(n_diag > 0, "diagonal shortcut");
    check(n_reuse > 0, "path re-use");
    check(n_data > 0, "data");
    check(n_timeout > 0, "time-out");
    $display("mechanisms: diagonal=%0d reuse=%0d data=%0d timeout=%0d", n_diag, n_reuse, n_data, n_timeout);
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
