// Shared types and helpers of the HIDRA routing plane and the POEtic-style
// molecule plane.
//
// Directions are numbered N=0, E=1, S=2, W=3. That is also the priority order
// used when several expansion signals arrive in the same cycle, so a plain
// lowest-index-first encoder gives the documented priority. The opposite of a
// direction is obtained by flipping bit 1. With 8 neighbours the routing
// plane numbers N=0, NE=1, E=2, ... NW=7 clockwise (see hidra_controller);
// the prop lines always use the four cardinal directions above.
//
// A switchbox multiplexer is described by three configuration bits: a
// "configured" flag (the multiplexer belongs to a path) and a two-bit select.
// For the multiplexer that drives direction d, a select equal to d itself
// (which would be a U-turn) is used to mean "the logic element's value".
// For the multiplexer that drives the logic element, the select is the
// neighbour direction.
package hidra_pkg;

  localparam logic [1:0] DIR_N = 2'd0;
  localparam logic [1:0] DIR_E = 2'd1;
  localparam logic [1:0] DIR_S = 2'd2;
  localparam logic [1:0] DIR_W = 2'd3;

  // Routing algorithm run by the controller (only the expansion phase differs).
  typedef enum logic [1:0] {
    ALG_HIDRA = 2'd0,  // parallel Lee wave, one hop per cycle
    ALG_RC    = 2'd1,  // reduced congestion: existing tree of the source also expands
    ALG_RT    = 2'd2,  // reduced time: line search, lines cross in one cycle
    ALG_RTC   = 2'd3   // RC and RT combined
  } algo_e;

  // What the logic element attached to a routing unit asks for.
  typedef enum logic [1:0] {
    ROLE_NONE   = 2'd0,  // nothing special
    ROLE_SOURCE = 2'd1,  // element output: drives a net, owns the identifier
    ROLE_TARGET = 2'd2   // element input: knows the identifier of its source
  } role_e;

  // Controller state. ST_TRACE is only ever entered by the reached target.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // normal operation; also the election cycle
    ST_ID     = 3'd1,  // master shifts its identifier on the prop lines
    ST_ROLE   = 3'd2,  // master tells whether it is a source or a target
    ST_EXPAND = 3'd3,  // expansion wave
    ST_TRACE  = 3'd4   // target found: end of process and traceback
  } ru_state_e;

  // Multiplexer configuration for 4 neighbours (the controller builds the
  // same layout with a wider select for 8 neighbours).
  typedef struct packed {
    logic       cfg;  // multiplexer is part of a path
    logic [1:0] sel;  // selected input (see above)
  } mux_cfg_t;

  // Operating modes of a molecule that are modelled.
  typedef enum logic [2:0] {
    MOL_LUT4      = 3'd0,  // 4-input look-up table
    MOL_SHIFT     = 3'd1,  // 16-bit shift register fed by LUT input 0
    MOL_ROUTE_OUT = 3'd2,  // sends LUT input 0 into the routing plane (net source)
    MOL_ROUTE_IN  = 3'd3   // takes its output from the routing plane (net target)
  } mol_mode_e;

  // Configuration word of one molecule, shifted in serially, MSB first.
  typedef struct packed {
    logic [7:0][2:0] sb_sel;  // switch box output multiplexers (dir*2+line)
    logic [3:0][2:0] in_sel;  // LUT input multiplexers, each picks one of 8 lines
    logic            init;    // route modes: start a connection (else wait)
    logic            seq;     // output taken from the flip-flop
    mol_mode_e       mode;
    logic [15:0]     lut;     // truth table, or the identifier in route modes
  } mol_cfg_t;

  localparam int unsigned MOL_CFG_W = $bits(mol_cfg_t);

endpackage
