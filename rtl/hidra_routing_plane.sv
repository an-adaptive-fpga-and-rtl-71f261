// Routing plane: an X by Y array of HIDRA routing units and the global trigger.
//
// Unit (x,y) has y=0 at the south (bottom) edge and x=0 at the west (left)
// edge, so the master of a routing process is the requesting unit with the
// lowest y, then the lowest x. Each unit's val_out/prop_out towards a
// neighbour is that neighbour's val_in/prop_in from the opposite side. The
// lines that cross the border of the array are brought out (edge_*), so
// planes can be tiled across chips; tie the inputs to '0' for a single plane.
// The trigger is paced from unit (0,0) (all units share one state sequence).
//
// NB selects 4 neighbours or the 8-neighbour Moore neighbourhood. With 8,
// only the cardinal val lines cross the border and the diagonal border inputs
// read '0': a choice of this design that keeps the pin count of the 4-
// neighbour plane (a border unit's diagonal links are simply unused).
// Element ports are packed [y][x] arrays. `congestion` is the OR of the units'
// failed flags: some master could not reach its partner.
// EXP_LIMIT, the expansion time-out, defaults to X*Y cycles: a growing wave
// reaches at least one new unit per cycle, so it cannot grow longer than that.
// The neighbour wiring of vout and pout forms combinational cycles in the
// netlist, and tools report them as circular logic. They are structural
// only: a configured path, the one-cycle traceback and an RT line each follow
// a single chain of units without closing it, and the prop forwarding of
// hidra_prop_unit is a tree. The warnings stand for that reason.
module hidra_routing_plane
  import hidra_pkg::*;
#(
  parameter int unsigned X         = 20,
  parameter int unsigned Y         = 20,
  parameter algo_e       ALGO      = ALG_HIDRA,
  parameter int unsigned NB        = 4,
  parameter int unsigned ID_W      = 16,
  parameter int unsigned EXP_LIMIT = X * Y
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // border lines, per edge, indexed along the edge (x for N/S, y for E/W)
  input  logic [X-1:0]         edge_val_in_n,  edge_val_in_s,
  output logic [X-1:0]         edge_val_out_n, edge_val_out_s,
  input  logic [X-1:0]         edge_prop_in_n, edge_prop_in_s,
  output logic [X-1:0]         edge_prop_out_n, edge_prop_out_s,
  input  logic [Y-1:0]         edge_val_in_e,  edge_val_in_w,
  output logic [Y-1:0]         edge_val_out_e, edge_val_out_w,
  input  logic [Y-1:0]         edge_prop_in_e, edge_prop_in_w,
  output logic [Y-1:0]         edge_prop_out_e, edge_prop_out_w,
  // logic element side of every unit
  input  role_e [Y-1:0][X-1:0] el_role,
  input  logic  [Y-1:0][X-1:0] el_init,
  input  logic  [Y-1:0][X-1:0] el_id_bit,
  output logic  [Y-1:0][X-1:0] el_id_shift,
  input  logic  [Y-1:0][X-1:0] el_val_in,
  output logic  [Y-1:0][X-1:0] el_val_out,
  output logic  [Y-1:0][X-1:0] connected,
  output logic  [Y-1:0][X-1:0] failed,
  output logic                 trigger,
  output logic                 congestion,
  output ru_state_e            state
);
  // neighbour offsets, index order as in hidra_controller
  function automatic int dxf(input int d);
    if (NB == 8) return (d >= 1 && d <= 3) ? 1 : (d >= 5) ? -1 : 0;
    return (d == 1) ? 1 : (d == 3) ? -1 : 0;
  endfunction
  function automatic int dyf(input int d);
    if (NB == 8) return (d == 0 || d == 1 || d == 7) ? 1 : (d >= 3 && d <= 5) ? -1 : 0;
    return (d == 0) ? 1 : (d == 2) ? -1 : 0;
  endfunction
  localparam int CN = 0, CE = NB / 4, CS = NB / 2, CW = 3 * NB / 4;  // cardinal val indices

  logic [NB-1:0] vin [Y][X];
  logic [NB-1:0] vout[Y][X];
  logic [3:0]    pin [Y][X];
  logic [3:0]    pout[Y][X];
  ru_state_e     st  [Y][X];

  for (genvar y = 0; y < Y; y++) begin : g_row
    for (genvar x = 0; x < X; x++) begin : g_col
      // val lines: from the neighbour in direction d, its opposite output
      for (genvar d = 0; d < NB; d++) begin : g_val
        localparam int NXD = x + dxf(d);
        localparam int NYD = y + dyf(d);
        localparam int OD  = (d + NB / 2) % NB;
        if (NXD >= 0 && NXD < X && NYD >= 0 && NYD < Y) begin : g_in
          assign vin[y][x][d] = vout[NYD][NXD][OD];
        end else if (d == CN) begin : g_n_edge
          assign vin[y][x][d] = edge_val_in_n[x];
        end else if (d == CS) begin : g_s_edge
          assign vin[y][x][d] = edge_val_in_s[x];
        end else if (d == CE) begin : g_e_edge
          assign vin[y][x][d] = edge_val_in_e[y];
        end else if (d == CW) begin : g_w_edge
          assign vin[y][x][d] = edge_val_in_w[y];
        end else begin : g_diag_edge
          assign vin[y][x][d] = 1'b0;  // diagonal lines are not brought out
        end
      end
      if (y == Y - 1) begin : g_n_out
        assign edge_val_out_n[x] = vout[y][x][CN];
      end
      if (y == 0) begin : g_s_out
        assign edge_val_out_s[x] = vout[y][x][CS];
      end
      if (x == X - 1) begin : g_e_out
        assign edge_val_out_e[y] = vout[y][x][CE];
      end
      if (x == 0) begin : g_w_out
        assign edge_val_out_w[y] = vout[y][x][CW];
      end
      // prop lines: always the four cardinal sides
      if (y == Y - 1) begin : g_pn_edge
        assign pin[y][x][DIR_N] = edge_prop_in_n[x];
        assign edge_prop_out_n[x] = pout[y][x][DIR_N];
      end else begin : g_pn
        assign pin[y][x][DIR_N] = pout[y+1][x][DIR_S];
      end
      if (y == 0) begin : g_ps_edge
        assign pin[y][x][DIR_S] = edge_prop_in_s[x];
        assign edge_prop_out_s[x] = pout[y][x][DIR_S];
      end else begin : g_ps
        assign pin[y][x][DIR_S] = pout[y-1][x][DIR_N];
      end
      if (x == X - 1) begin : g_pe_edge
        assign pin[y][x][DIR_E] = edge_prop_in_e[y];
        assign edge_prop_out_e[y] = pout[y][x][DIR_E];
      end else begin : g_pe
        assign pin[y][x][DIR_E] = pout[y][x+1][DIR_W];
      end
      if (x == 0) begin : g_pw_edge
        assign pin[y][x][DIR_W] = edge_prop_in_w[y];
        assign edge_prop_out_w[y] = pout[y][x][DIR_W];
      end else begin : g_pw
        assign pin[y][x][DIR_W] = pout[y][x-1][DIR_E];
      end

      hidra_routing_unit #(.ALGO(ALGO), .NB(NB)) u_ru (
        .clk, .rst_n, .trigger,
        .val_in     (vin[y][x]),
        .val_out    (vout[y][x]),
        .prop_in    (pin[y][x]),
        .prop_out   (pout[y][x]),
        .el_role    (el_role[y][x]),
        .el_init    (el_init[y][x]),
        .el_id_bit  (el_id_bit[y][x]),
        .el_id_shift(el_id_shift[y][x]),
        .el_val_in  (el_val_in[y][x]),
        .el_val_out (el_val_out[y][x]),
        .connected  (connected[y][x]),
        .failed     (failed[y][x]),
        .state      (st[y][x])
      );
    end
  end

  assign state      = st[0][0];
  assign congestion = |failed;

  hidra_trigger #(.ID_W(ID_W), .EXP_LIMIT(EXP_LIMIT)) u_trig (
    .clk, .rst_n, .state(st[0][0]), .trigger
  );

endmodule
