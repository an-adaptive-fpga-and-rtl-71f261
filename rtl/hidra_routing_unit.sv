// HIDRA routing unit: controller, switchbox and the NB multiplexers in front
// of val_out (NB = 4 neighbours, or 8).
//
// In normal operation (controller idle) each val_out carries the switchbox
// output, so configured paths carry data combinationally across the plane,
// and el_val_out gives the element the value its element multiplexer selects.
// While a routing process runs, the controller's value has priority on all
// val_out lines. prop_out lines come straight from the propagation unit.
// While reset is asserted val_out is held at '0' (a choice of this design, so
// that random power-up states cannot close loops through the neighbours).
// val ports have NB bits, indexed as in hidra_controller (N first, then
// clockwise); prop ports are N=0, E=1, S=2, W=3. Structure as documented; the
// algorithm variant is ALGO and the neighbourhood NB (4 or 8).
module hidra_routing_unit
  import hidra_pkg::*;
#(
  parameter algo_e       ALGO = ALG_HIDRA,
  parameter int unsigned NB   = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           trigger,
  input  logic  [NB-1:0] val_in,
  output logic  [NB-1:0] val_out,
  input  logic     [3:0] prop_in,
  output logic     [3:0] prop_out,
  // logic element side
  input  role_e          el_role,
  input  logic           el_init,
  input  logic           el_id_bit,
  output logic           el_id_shift,
  input  logic           el_val_in,
  output logic           el_val_out,
  output logic           connected,
  output logic           failed,
  output ru_state_e      state
);
  localparam int unsigned SW = $clog2(NB);
  logic [NB:0][SW:0] mux_cfg;
  logic [NB-1:0]     ctrl_val, sw_out;
  logic              ctrl_active;

  hidra_controller #(.ALGO(ALGO), .NB(NB)) u_ctrl (
    .clk, .rst_n, .trigger,
    .el_role, .el_init, .el_id_bit, .el_id_shift, .connected, .failed,
    .prop_in, .prop_out, .val_in, .ctrl_val, .ctrl_active, .mux_cfg, .state
  );

  hidra_switchbox #(.NB(NB)) u_sw (
    .mux_cfg, .val_in, .el_in(el_val_in), .sw_out, .el_out(el_val_out)
  );

  assign val_out = !rst_n ? '0 : ctrl_active ? ctrl_val : sw_out;

endmodule
