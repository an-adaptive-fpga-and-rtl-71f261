// Interface between one routing unit and the 2x2 molecules below it.
//
// The routing unit serves a single logic element. The interface picks, in
// index order 0..3, the first of its four molecules that is in a route mode
// and connects it to the routing unit: role, start request, identifier bit,
// shift enable and the data value in both directions. The other molecules
// receive no shift and a '0' from the routing plane. Combinational.
// That a routing unit sits over four molecules follows the document; the
// fixed selection order is a choice of this design.
module hidra_interface
  import hidra_pkg::*;
(
  // molecule side
  input  role_e [3:0] m_role,
  input  logic  [3:0] m_init,
  input  logic  [3:0] m_id_bit,
  output logic  [3:0] m_id_shift,
  input  logic  [3:0] m_val,
  output logic  [3:0] m_val_in,
  // routing unit side
  output role_e       el_role,
  output logic        el_init,
  output logic        el_id_bit,
  input  logic        el_id_shift,
  output logic        el_val_in,
  input  logic        el_val_out
);
  logic [3:0] act, pick;

  always_comb begin
    for (int i = 0; i < 4; i++) act[i] = (m_role[i] != ROLE_NONE);
    pick = act & (~act + 4'd1);  // lowest active molecule, one-hot
    el_role   = ROLE_NONE;
    el_init   = 1'b0;
    el_id_bit = 1'b0;
    el_val_in = 1'b0;
    for (int i = 0; i < 4; i++) begin
      m_id_shift[i] = pick[i] & el_id_shift;
      m_val_in[i]   = pick[i] & el_val_out;
      if (pick[i]) begin
        el_role   = m_role[i];
        el_init   = m_init[i];
        el_id_bit = m_id_bit[i];
        el_val_in = m_val[i];
      end
    end
  end

endmodule
