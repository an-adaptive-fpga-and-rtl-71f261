// Reconfigurable fabric with distributed routing: a plane of molecules under a
// plane of HIDRA routing units.
//
// The bottom plane is a 2X by 2Y grid of molecules linked by their switch
// boxes (two lines per direction between neighbours). Above it, an X by Y
// routing plane: routing unit (x,y) serves molecules (2x..2x+1, 2y..2y+1)
// through a hidra_interface, which hands the routing unit the first of its
// four molecules that is in a route mode. A molecule in MOL_ROUTE_OUT mode is
// a net source, one in MOL_ROUTE_IN a net target; both hold the net's 16-bit
// identifier in their LUT. When such molecules ask for a connection the
// routing units run HIDRA processes on their own, one after the other, and
// configure their switchboxes; afterwards the value a source molecule sends
// reaches the target molecule combinationally through the routing plane.
//
// Configuration: all molecules sit on one serial chain, molecule index
// my*2X+mx (mx, my from the south-west corner), MOL_CFG_W bits each. The word
// for the last molecule of the chain is shifted in first, MSB first.
//
// Ports: the molecule grid's border lines (mol_*: [position along the edge]
// [line]) and the routing plane's border val/prop lines (rt_*) are brought
// out so fabrics can be tiled; tie the inputs to '0' for a single fabric.
// `connected` and `failed` report every routing unit; `congestion` is set
// when a process could not find its partner. X, Y default to the 20 by 20
// array of routing units used for the evaluation; ALGO defaults to the basic
// HIDRA, the variant built in silicon; NB = 4 neighbours by default, 8 for the
// Moore neighbourhood.
//
// The switch-box and routing planes form combinational structures that loop
// through neighbours (data paths, the traceback and the line search of the
// RT variants). Configured paths never close a loop, so these loops are only
// structural; the circular-logic warnings on the plane wiring stand for that
// reason.
module poetic_fabric
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
  input  logic                 cfg_en,
  input  logic                 cfg_in,
  output logic                 cfg_out,
  input  logic [2*X-1:0][1:0]  mol_in_n,  mol_in_s,
  output logic [2*X-1:0][1:0]  mol_out_n, mol_out_s,
  input  logic [2*Y-1:0][1:0]  mol_in_e,  mol_in_w,
  output logic [2*Y-1:0][1:0]  mol_out_e, mol_out_w,
  input  logic [X-1:0]         rt_val_in_n,  rt_val_in_s,  rt_prop_in_n,  rt_prop_in_s,
  output logic [X-1:0]         rt_val_out_n, rt_val_out_s, rt_prop_out_n, rt_prop_out_s,
  input  logic [Y-1:0]         rt_val_in_e,  rt_val_in_w,  rt_prop_in_e,  rt_prop_in_w,
  output logic [Y-1:0]         rt_val_out_e, rt_val_out_w, rt_prop_out_e, rt_prop_out_w,
  output logic [Y-1:0][X-1:0]  connected,
  output logic [Y-1:0][X-1:0]  failed,
  output logic                 congestion,
  output ru_state_e            state
);
  localparam int unsigned MX = 2 * X;
  localparam int unsigned MY = 2 * Y;

  // ------------------------------------------------------------ molecules
  logic  [7:0] m_sin [MY][MX];
  logic  [7:0] m_sout[MY][MX];
  logic        m_chain[MY*MX+1];
  role_e       m_role [MY][MX];
  logic        m_init [MY][MX];
  logic        m_idb  [MY][MX];
  logic        m_shift[MY][MX];
  logic        m_val  [MY][MX];
  logic        m_vin  [MY][MX];

  assign m_chain[0] = cfg_in;
  assign cfg_out    = m_chain[MY*MX];

  for (genvar my = 0; my < MY; my++) begin : g_mrow
    for (genvar mx = 0; mx < MX; mx++) begin : g_mcol
      for (genvar l = 0; l < 2; l++) begin : g_line
        if (my == MY - 1) begin : g_n_edge
          assign m_sin[my][mx][DIR_N*2+l] = mol_in_n[mx][l];
          assign mol_out_n[mx][l]         = m_sout[my][mx][DIR_N*2+l];
        end else begin : g_n
          assign m_sin[my][mx][DIR_N*2+l] = m_sout[my+1][mx][DIR_S*2+l];
        end
        if (my == 0) begin : g_s_edge
          assign m_sin[my][mx][DIR_S*2+l] = mol_in_s[mx][l];
          assign mol_out_s[mx][l]         = m_sout[my][mx][DIR_S*2+l];
        end else begin : g_s
          assign m_sin[my][mx][DIR_S*2+l] = m_sout[my-1][mx][DIR_N*2+l];
        end
        if (mx == MX - 1) begin : g_e_edge
          assign m_sin[my][mx][DIR_E*2+l] = mol_in_e[my][l];
          assign mol_out_e[my][l]         = m_sout[my][mx][DIR_E*2+l];
        end else begin : g_e
          assign m_sin[my][mx][DIR_E*2+l] = m_sout[my][mx+1][DIR_W*2+l];
        end
        if (mx == 0) begin : g_w_edge
          assign m_sin[my][mx][DIR_W*2+l] = mol_in_w[my][l];
          assign mol_out_w[my][l]         = m_sout[my][mx][DIR_W*2+l];
        end else begin : g_w
          assign m_sin[my][mx][DIR_W*2+l] = m_sout[my][mx-1][DIR_E*2+l];
        end
      end

      logic unused_out;
      poetic_molecule u_mol (
        .clk, .rst_n, .cfg_en,
        .cfg_in     (m_chain[my*MX+mx]),
        .cfg_out    (m_chain[my*MX+mx+1]),
        .sw_in      (m_sin[my][mx]),
        .sw_out     (m_sout[my][mx]),
        .rt_role    (m_role[my][mx]),
        .rt_init    (m_init[my][mx]),
        .rt_id_bit  (m_idb[my][mx]),
        .rt_id_shift(m_shift[my][mx]),
        .rt_val     (m_val[my][mx]),
        .rt_val_in  (m_vin[my][mx]),
        .mol_out    (unused_out)
      );
    end
  end

  // ------------------------------------------------------------ interfaces
  role_e [Y-1:0][X-1:0] el_role;
  logic  [Y-1:0][X-1:0] el_init, el_id_bit, el_id_shift, el_val_in, el_val_out;

  for (genvar y = 0; y < Y; y++) begin : g_irow
    for (genvar x = 0; x < X; x++) begin : g_icol
      role_e [3:0] r;
      logic  [3:0] ini, idb, sh, v, vi;
      for (genvar k = 0; k < 4; k++) begin : g_k
        localparam int MXK = 2 * x + (k % 2);
        localparam int MYK = 2 * y + (k / 2);
        assign r[k]   = m_role[MYK][MXK];
        assign ini[k] = m_init[MYK][MXK];
        assign idb[k] = m_idb[MYK][MXK];
        assign v[k]   = m_val[MYK][MXK];
        assign m_shift[MYK][MXK] = sh[k];
        assign m_vin[MYK][MXK]   = vi[k];
      end
      hidra_interface u_if (
        .m_role(r), .m_init(ini), .m_id_bit(idb), .m_id_shift(sh),
        .m_val(v), .m_val_in(vi),
        .el_role    (el_role[y][x]),
        .el_init    (el_init[y][x]),
        .el_id_bit  (el_id_bit[y][x]),
        .el_id_shift(el_id_shift[y][x]),
        .el_val_in  (el_val_in[y][x]),
        .el_val_out (el_val_out[y][x])
      );
    end
  end

  // ------------------------------------------------------------ routing plane
  logic unused_trigger;
  hidra_routing_plane #(
    .X(X), .Y(Y), .ALGO(ALGO), .NB(NB), .ID_W(ID_W), .EXP_LIMIT(EXP_LIMIT)
  ) u_plane (
    .clk, .rst_n,
    .edge_val_in_n  (rt_val_in_n),   .edge_val_in_s  (rt_val_in_s),
    .edge_val_out_n (rt_val_out_n),  .edge_val_out_s (rt_val_out_s),
    .edge_prop_in_n (rt_prop_in_n),  .edge_prop_in_s (rt_prop_in_s),
    .edge_prop_out_n(rt_prop_out_n), .edge_prop_out_s(rt_prop_out_s),
    .edge_val_in_e  (rt_val_in_e),   .edge_val_in_w  (rt_val_in_w),
    .edge_val_out_e (rt_val_out_e),  .edge_val_out_w (rt_val_out_w),
    .edge_prop_in_e (rt_prop_in_e),  .edge_prop_in_w (rt_prop_in_w),
    .edge_prop_out_e(rt_prop_out_e), .edge_prop_out_w(rt_prop_out_w),
    .el_role, .el_init, .el_id_bit, .el_id_shift, .el_val_in, .el_val_out,
    .connected, .failed,
    .trigger   (unused_trigger),
    .congestion,
    .state
  );

endmodule
