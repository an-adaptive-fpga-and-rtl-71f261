// Propagation unit of a HIDRA routing unit.
//
// Purely combinational. A unit that drives `own` sends a '1' on all four prop
// outputs. A '1' arriving from the west is passed north, south and east; from
// the east it goes north, south and west; from the south only north; from the
// north only south. Every unit of the array is thus reached in the same cycle
// along a loop-free tree: the row of the sender first, then every column.
// The forwarding rules for the west and south inputs are the documented ones;
// the east and north rules are their mirror images, chosen here.
//
// A side effect is a bottom-left priority: a unit sees a '1' on its south
// input when some unit of a lower row drives, and on its west input when a
// unit further west in its own row drives. `lower` is therefore low exactly
// for the bottom-most, then left-most, driving unit, which becomes master.
//
// Interface: prop_in/prop_out indexed N=0,E=1,S=2,W=3; `rx` is the OR of all
// inputs, the value broadcast by the one unit that drives during a phase.
module hidra_prop_unit (
  input  logic       own,
  input  logic [3:0] prop_in,
  output logic [3:0] prop_out,
  output logic       rx,
  output logic       lower
);
  import hidra_pkg::*;

  always_comb begin
    prop_out[DIR_N] = own | prop_in[DIR_S] | prop_in[DIR_E] | prop_in[DIR_W];
    prop_out[DIR_S] = own | prop_in[DIR_N] | prop_in[DIR_E] | prop_in[DIR_W];
    prop_out[DIR_E] = own | prop_in[DIR_W];
    prop_out[DIR_W] = own | prop_in[DIR_E];
    rx    = |prop_in;
    lower = prop_in[DIR_S] | prop_in[DIR_W];
  end

endmodule
