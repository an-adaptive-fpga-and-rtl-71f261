// Workload test of the routing plane at its default size (20x20 units):
// random nets placed on the plane are routed one after another, as in the
// congestion experiments on a 20x20 array. Plane 0 has every parameter at its
// default (4 neighbours, HIDRA); plane 1 is the 8-neighbour HIDRA-RC plane
// and gets the same nets.
//
// NNET sources, each with TPS targets, get distinct random positions from a
// fixed linear congruential sequence. All targets request at once; the
// election then serves them one process at a time. The testbench waits until
// every target is connected or has timed out (failed), then drives random
// values on the sources and checks that every connected target receives the
// value of its own source, and that a target never reports both. It prints
// the number of connected and failed targets, the congestion flag and the
// cycles taken. Whether a target is connected is not predicted (it depends on
// the order of the paths), so the checks are: each process ends in one of the
// two outcomes, data reach the right targets, at least half the targets are
// connected, congestion is set exactly when some target failed, and plane 1
// fails no more targets than plane 0.
module tb_hidra_plane_workload;
  import hidra_pkg::*;
  localparam int NX = 20, NY = 20;
  localparam int NNET = 25, TPS = 3;  // 100 routed units, 75 paths

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  role_e [NY-1:0][NX-1:0] role;
  logic  [NY-1:0][NX-1:0] init, vin;
  logic  [NY-1:0][NX-1:0] idb [2], sh [2], vo [2], cn [2], fl [2];
  logic  [15:0]           id_set [NY][NX];
  logic  [15:0]           idr    [2][NY][NX];
  logic  [1:0]            cong;
  logic                   load;
  int                     net_of [NY][NX];  // -1: free
  int                     src_y [NNET], src_x [NNET];
  int                     tgt_y [NNET*TPS], tgt_x [NNET*TPS];

  hidra_routing_plane u0 (
    .clk, .rst_n,
    .edge_val_in_n('0), .edge_val_in_s('0), .edge_val_out_n(), .edge_val_out_s(),
    .edge_prop_in_n('0), .edge_prop_in_s('0), .edge_prop_out_n(), .edge_prop_out_s(),
    .edge_val_in_e('0), .edge_val_in_w('0), .edge_val_out_e(), .edge_val_out_w(),
    .edge_prop_in_e('0), .edge_prop_in_w('0), .edge_prop_out_e(), .edge_prop_out_w(),
    .el_role(role), .el_init(init), .el_id_bit(idb[0]), .el_id_shift(sh[0]),
    .el_val_in(vin), .el_val_out(vo[0]), .connected(cn[0]), .failed(fl[0]),
    .trigger(), .congestion(cong[0]), .state()
  );

  hidra_routing_plane #(.ALGO(ALG_RC), .NB(8)) u1 (
    .clk, .rst_n,
    .edge_val_in_n('0), .edge_val_in_s('0), .edge_val_out_n(), .edge_val_out_s(),
    .edge_prop_in_n('0), .edge_prop_in_s('0), .edge_prop_out_n(), .edge_prop_out_s(),
    .edge_val_in_e('0), .edge_val_in_w('0), .edge_val_out_e(), .edge_val_out_w(),
    .edge_prop_in_e('0), .edge_prop_in_w('0), .edge_prop_out_e(), .edge_prop_out_w(),
    .el_role(role), .el_init(init), .el_id_bit(idb[1]), .el_id_shift(sh[1]),
    .el_val_in(vin), .el_val_out(vo[1]), .connected(cn[1]), .failed(fl[1]),
    .trigger(), .congestion(cong[1]), .state()
  );

  for (genvar p = 0; p < 2; p++) begin : g_p
    for (genvar y = 0; y < NY; y++) begin : g_y
      for (genvar x = 0; x < NX; x++) begin : g_x
        always_ff @(posedge clk)
          if (load) idr[p][y][x] <= id_set[y][x];
          else if (sh[p][y][x]) idr[p][y][x] <= {idr[p][y][x][14:0], idr[p][y][x][15]};
        assign idb[p][y][x] = idr[p][y][x][15];
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned lcg = 32'd12345;
  function automatic int unsigned rnd(input int unsigned n);
    lcg = lcg * 32'd1103515245 + 32'd12345;
    return (lcg >> 8) % n;
  endfunction

  task automatic place(output int py, output int px, input int net);
    do begin py = int'(rnd(NY)); px = int'(rnd(NX)); end while (net_of[py][px] >= 0);
    net_of[py][px] = net;
  endtask

  initial begin
    int n_conn[2] = '{0, 0}, n_fail[2] = '{0, 0};
    int cycles = 0, n_data = 0;
    bit all_done;
    bit congested[2];
    role = '0; init = '0; vin = '0; load = 0;
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin id_set[y][x] = '0; net_of[y][x] = -1; end
    for (int n = 0; n < NNET; n++) begin
      place(src_y[n], src_x[n], n);
      role[src_y[n]][src_x[n]] = ROLE_SOURCE;
      id_set[src_y[n]][src_x[n]] = 16'(n + 1);
      for (int t = 0; t < TPS; t++) begin
        place(tgt_y[n*TPS+t], tgt_x[n*TPS+t], n);
        role[tgt_y[n*TPS+t]][tgt_x[n*TPS+t]] = ROLE_TARGET;
        id_set[tgt_y[n*TPS+t]][tgt_x[n*TPS+t]] = 16'(n + 1);
      end
    end
    load = 1;
    repeat (3) @(posedge clk);
    #1; load = 0; rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < NNET * TPS; i++) init[tgt_y[i]][tgt_x[i]] = 1;

    do begin
      @(posedge clk); #1;
      cycles++;
      all_done = 1;
      for (int p = 0; p < 2; p++)
        for (int i = 0; i < NNET * TPS; i++)
          if (!cn[p][tgt_y[i]][tgt_x[i]] && !fl[p][tgt_y[i]][tgt_x[i]]) all_done = 0;
    end while (!all_done && cycles < 200000);
    check(all_done, "every target connected or failed");

    for (int p = 0; p < 2; p++) begin
      for (int i = 0; i < NNET * TPS; i++) begin
        check(!(cn[p][tgt_y[i]][tgt_x[i]] && fl[p][tgt_y[i]][tgt_x[i]]), "connected and failed");
        if (cn[p][tgt_y[i]][tgt_x[i]]) n_conn[p]++;
        if (fl[p][tgt_y[i]][tgt_x[i]]) n_fail[p]++;
      end
      check(cong[p] == (n_fail[p] > 0), $sformatf("congestion flag plane %0d", p));
      congested[p] = cong[p];
      check(2 * n_conn[p] >= NNET * TPS, $sformatf("plane %0d only %0d connected", p, n_conn[p]));
    end
    check(n_fail[1] <= n_fail[0], "8 neighbours with RC fail no more targets");

    // data: each connected target sees its own source
    init = '0;
    @(posedge clk); #1;
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < NNET; n++) vin[src_y[n]][src_x[n]] = 1'(rnd(2));
      #1;
      for (int p = 0; p < 2; p++)
        for (int i = 0; i < NNET * TPS; i++)
          if (cn[p][tgt_y[i]][tgt_x[i]]) begin
            check(vo[p][tgt_y[i]][tgt_x[i]] == vin[src_y[i/TPS]][src_x[i/TPS]],
                  $sformatf("data plane %0d net %0d target %0d", p, i / TPS, i % TPS));
            n_data++;
          end
    end
    check(n_data > 0, "data");
    for (int p = 0; p < 2; p++)
      $display("workload plane %0d: %0d nets x %0d targets on %0dx%0d: connected=%0d failed=%0d congestion=%0b",
               p, NNET, TPS, NX, NY, n_conn[p], n_fail[p], congested[p]);
    $display("cycles until every target was served in both planes: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
