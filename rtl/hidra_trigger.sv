// Global trigger of the routing plane.
//
// One trigger line is shared by all routing units. It is paced from the state
// of one routing unit (all units move through the phases in lockstep). During
// the identifier phase it gives a '1' on the ID_W-th cycle, marking the last
// identifier bit. During the expansion phase it gives a '1' after EXP_LIMIT
// cycles: no wave of a HIDRA variant can still be growing by then, so this
// ends a process whose target cannot be reached (congestion). Using the
// trigger as that time-out is a choice of this design; the document only
// says that a flag reports that no path was found.
//
// Timing: the counter is cleared in every other state, so the count starts
// at the first cycle of each phase.
module hidra_trigger
  import hidra_pkg::*;
#(
  parameter int unsigned ID_W      = 16,
  parameter int unsigned EXP_LIMIT = 400
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ru_state_e state,
  output logic      trigger
);
  localparam int unsigned CW = $clog2((ID_W > EXP_LIMIT ? ID_W : EXP_LIMIT) + 1);
  logic [CW-1:0] cnt_q;
  logic          counting;

  assign counting = (state == ST_ID) || (state == ST_EXPAND);
  assign trigger  = ((state == ST_ID)     && (cnt_q == CW'(ID_W - 1))) ||
                    ((state == ST_EXPAND) && (cnt_q == CW'(EXP_LIMIT - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     cnt_q <= '0;
    else if (counting && !trigger)  cnt_q <= cnt_q + 1'b1;
    else                            cnt_q <= '0;
  end

endmodule
