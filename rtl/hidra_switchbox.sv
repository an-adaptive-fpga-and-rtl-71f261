// Switchbox of a HIDRA routing unit.
//
// NB+1 multiplexers: one towards each of the NB neighbours and one towards the
// logic element. A neighbour multiplexer chooses among the NB-1 other
// neighbours and the element; the element multiplexer chooses among the NB
// neighbours. Each multiplexer has a "configured" flag (part of a path) and a
// select of $clog2(NB) bits, written by the controller: 3 bits per
// multiplexer and 15 in all for 4 neighbours, 4 and 36 for 8 neighbours. For
// the multiplexer towards neighbour d, a select equal to d means "the
// element". An unconfigured multiplexer drives '0' (a choice of this design:
// what an unused output carries is not specified). Combinational.
module hidra_switchbox #(
  parameter int unsigned NB = 4,
  localparam int unsigned SW = $clog2(NB)
) (
  input  logic [NB:0][SW:0] mux_cfg,   // {configured, select}; index NB = element
  input  logic [NB-1:0]     val_in,    // from the neighbours
  input  logic              el_in,     // from the logic element
  output logic [NB-1:0]     sw_out,    // towards the neighbours
  output logic              el_out     // towards the logic element
);
  always_comb begin
    for (int d = 0; d < NB; d++) begin
      if (!mux_cfg[d][SW])                          sw_out[d] = 1'b0;
      else if (mux_cfg[d][SW-1:0] == SW'(d))        sw_out[d] = el_in;
      else                                          sw_out[d] = val_in[mux_cfg[d][SW-1:0]];
    end
    el_out = mux_cfg[NB][SW] & val_in[mux_cfg[NB][SW-1:0]];
  end

endmodule
