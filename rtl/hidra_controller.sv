// Controller of a HIDRA routing unit: state machine, propagation unit and
// serial comparator, plus the switchbox configuration bits it manages.
//
// A routing process runs in lockstep in every unit of the plane:
//  1. Election (ST_IDLE, 1 cycle). Units whose element wants a connection
//     drive '1' on the prop lines; the bottom-most, then left-most of them
//     sees no '1' from the south or west and becomes master.
//  2. Identifier (ST_ID, ID_W cycles, ended by the trigger). The master
//     drives its identifier bit by bit on the prop lines; every unit asks its
//     element to shift its identifier (el_id_shift) and sources and targets
//     compare bit by bit.
//  3. Role (ST_ROLE, 1 cycle). The master drives '1' if it is a source. If it
//     is, the other matching sources drop out; if it is a target, the other
//     matching targets drop out. The participating source becomes the root
//     of the expansion.
//  4. Expansion (ST_EXPAND). Reached units send '1' on val_out towards every
//     neighbour whose multiplexer is free or already selects the unit's own
//     origin (re-use of a path of the same source). An unreached unit that
//     receives a '1' stores its origin (priority N, E, S, W). ALGO selects
//     the variant:
//       HIDRA  one hop per cycle;
//       RC     the configured tree of the source is followed combinationally,
//              so every unit already on it expands from the first cycle;
//       RT     a newly reached unit passes the wave straight on to the
//              opposite side in the same cycle (lines);
//       RTC    both.
//  5. Trace (1 cycle). The reached target goes to ST_TRACE, drives '1' on the
//     prop lines (end of process) and '1' towards its origin. Every reached
//     unit passes a '1' arriving in this cycle on to its own origin, so the
//     traceback runs combinationally back to the source, and on the clock
//     edge each unit on the path sets the multiplexer towards the neighbour
//     the traceback came from to select its origin. All units return to
//     ST_IDLE.
// NB is the number of neighbours: 4 (N, E, S, W, indices 0..3) or 8 (Moore
// neighbourhood, N, NE, E, SE, S, SW, W, NW, indices 0..7). The index order
// is the expansion priority and the opposite of d is (d + NB/2) mod NB. The
// prop lines always run on the four cardinal sides.
// Without obstacles a process takes 1 + ID_W + 1 + d + 1 cycles, d being the
// number of expansion cycles (for HIDRA the Manhattan distance with 4
// neighbours, the larger of |dx| and |dy| with 8; at most 2 for RT).
// If the trigger fires during expansion (time-out) the process is dropped and
// the master sets `failed`, which stops it from requesting again until its
// element releases `el_init`.
//
// During a process (state other than ST_IDLE) val_out carries `ctrl_val`;
// `ctrl_active` tells the routing unit to select it instead of the switchbox.
//
// The document gives the phases, the priority order and the path re-use rule.
// Choices of this design: one flip-flop each for "reached" and "root" beside
// the documented connected/master/participate/origin registers, the failed
// flag, five states instead of six (the election shares the idle state), and
// the combinational traceback, which gives the single path-creation cycle the
// document counts.
module hidra_controller
  import hidra_pkg::*;
#(
  parameter algo_e       ALGO = ALG_HIDRA,
  parameter int unsigned NB   = 4,
  localparam int unsigned SW  = $clog2(NB)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           trigger,
  // logic element side
  input  role_e          el_role,
  input  logic           el_init,
  input  logic           el_id_bit,
  output logic           el_id_shift,
  output logic           connected,
  output logic           failed,
  // neighbour side
  input  logic     [3:0] prop_in,
  output logic     [3:0] prop_out,
  input  logic  [NB-1:0] val_in,
  output logic  [NB-1:0] ctrl_val,
  output logic           ctrl_active,
  // switchbox: per multiplexer {configured, select}; index NB = element
  output logic [NB:0][SW:0] mux_cfg,
  output ru_state_e      state
);
  localparam bit RC = (ALGO == ALG_RC) || (ALGO == ALG_RTC);
  localparam bit RT = (ALGO == ALG_RT) || (ALGO == ALG_RTC);

  typedef logic [SW-1:0] dir_t;
  typedef struct packed {
    logic cfg;
    dir_t sel;
  } mcfg_t;

  function automatic dir_t opp_d(input dir_t d);
    return dir_t'((int'(d) + NB / 2) % NB);
  endfunction

  // lowest set index: the priority order N first, then clockwise
  function automatic dir_t prio(input logic [NB-1:0] v);
    dir_t r = '0;
    for (int i = NB - 1; i >= 0; i--) if (v[i]) r = dir_t'(i);
    return r;
  endfunction

  ru_state_e      state_q;
  logic           master_q, part_q, connected_q, failed_q;
  logic           reached_q, root_q;
  dir_t           origin_q;
  mcfg_t   [NB:0] mux_q;

  logic is_src, is_tgt, req, eligible;
  logic prop_own, prop_rx, prop_lower;
  logic match;

  assign is_src   = (el_role == ROLE_SOURCE);
  assign is_tgt   = (el_role == ROLE_TARGET);
  assign req      = el_init & (is_src | is_tgt) & ~connected_q & ~failed_q;
  assign eligible = is_src | (is_tgt & ~connected_q);

  always_comb begin
    unique case (state_q)
      ST_IDLE:  prop_own = req;
      ST_ID:    prop_own = master_q & el_id_bit;
      ST_ROLE:  prop_own = master_q & is_src;
      ST_TRACE: prop_own = 1'b1;
      default:  prop_own = 1'b0;
    endcase
  end

  hidra_prop_unit u_prop (
    .own      (prop_own),
    .prop_in  (prop_in),
    .prop_out (prop_out),
    .rx       (prop_rx),
    .lower    (prop_lower)
  );

  hidra_serial_cmp u_cmp (
    .clk    (clk),
    .clear  (state_q == ST_IDLE),
    .en     ((state_q == ST_ID) && !master_q),
    .rx_bit (prop_rx),
    .id_bit (el_id_bit),
    .match  (match)
  );

  // ---------------------------------------------------------------- expansion
  logic [NB-1:0] tree_in, allowed, expand_out, trace_out;
  logic          tree_lit, hot, newly, root_eff, end_now;
  dir_t          o_comb, o_eff;

  always_comb begin
    // Inputs that feed a configured multiplexer of this unit: a wave arriving
    // there comes along an existing path of the current source.
    tree_in = '0;
    for (int d = 0; d <= NB; d++)
      if (mux_q[d].cfg && !(d < NB && mux_q[d].sel == dir_t'(d)))
        tree_in[mux_q[d].sel] = val_in[mux_q[d].sel];
    tree_lit = RC && !reached_q && (|tree_in);
    newly    = !reached_q && (|val_in);
    o_comb   = tree_lit ? prio(tree_in) : prio(val_in);
    o_eff    = reached_q ? origin_q : o_comb;
    root_eff = reached_q & root_q;
    hot      = reached_q | tree_lit;

    for (int d = 0; d < NB; d++) begin
      allowed[d] = !mux_q[d].cfg ||
                   (mux_q[d].sel == (root_eff ? dir_t'(d) : o_eff));
      if (!root_eff && dir_t'(d) == o_eff) allowed[d] = 1'b0;  // never back to origin
      expand_out[d] = allowed[d] &
                      (hot | (RT && newly && dir_t'(d) == opp_d(o_eff)));
    end

    end_now = (state_q == ST_TRACE) || ((state_q == ST_EXPAND) && prop_rx);
    for (int d = 0; d < NB; d++)
      trace_out[d] = reached_q && !root_q && (dir_t'(d) == origin_q) &&
                     ((state_q == ST_TRACE) || (|val_in));

    if (end_now)                   ctrl_val = trace_out;
    else if (state_q == ST_EXPAND) ctrl_val = expand_out;
    else                           ctrl_val = '0;
  end

  assign ctrl_active = (state_q != ST_IDLE);
  assign el_id_shift = (state_q == ST_ID);
  assign connected   = connected_q;
  assign failed      = failed_q;
  assign mux_cfg     = mux_q;
  assign state       = state_q;

  // ---------------------------------------------------------------- sequence
  logic src_master;
  assign src_master = master_q ? is_src : prop_rx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_IDLE;
      master_q    <= 1'b0;
      part_q      <= 1'b0;
      connected_q <= 1'b0;
      failed_q    <= 1'b0;
      reached_q   <= 1'b0;
      root_q      <= 1'b0;
      origin_q    <= '0;
      mux_q       <= '0;
    end else begin
      unique case (state_q)
        ST_IDLE: begin
          part_q    <= 1'b0;
          reached_q <= 1'b0;
          root_q    <= 1'b0;
          if (!el_init) failed_q <= 1'b0;
          if (req || prop_rx) begin
            master_q <= req & ~prop_lower;
            state_q  <= ST_ID;
          end
        end
        ST_ID: begin
          if (trigger) begin
            part_q  <= master_q | (match & eligible);
            state_q <= ST_ROLE;
          end
        end
        ST_ROLE: begin
          if (part_q && (master_q || (src_master ? is_tgt : is_src))) begin
            part_q <= 1'b1;
            if (is_src) begin
              reached_q <= 1'b1;
              root_q    <= 1'b1;
            end
          end else begin
            part_q <= 1'b0;
          end
          state_q <= ST_EXPAND;
        end
        ST_EXPAND: begin
          if (prop_rx) begin
            // end of process: traceback passing through this unit
            if (reached_q) begin
              for (int d = 0; d < NB; d++)
                if (val_in[d]) mux_q[d] <= '{cfg: 1'b1, sel: root_q ? dir_t'(d) : origin_q};
              if (root_q && (|val_in)) connected_q <= 1'b1;
            end
            state_q <= ST_IDLE;
          end else if (newly) begin
            reached_q <= 1'b1;
            origin_q  <= o_comb;
            if (part_q && is_tgt) state_q <= ST_TRACE;
            else if (trigger) begin
              state_q <= ST_IDLE;
              if (master_q) failed_q <= 1'b1;
            end
          end else if (trigger) begin
            state_q <= ST_IDLE;
            if (master_q) failed_q <= 1'b1;
          end
        end
        ST_TRACE: begin
          mux_q[NB] <= '{cfg: 1'b1, sel: origin_q};
          connected_q   <= 1'b1;
          state_q       <= ST_IDLE;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

endmodule
