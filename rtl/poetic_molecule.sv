// Molecule: the programmable logic element of the bottom plane.
//
// A molecule holds a 16-bit truth table and a flip-flop, and its output is
// either combinational or registered (`seq`). Four input multiplexers pick the
// LUT inputs among the 8 switch box input lines. The switch box has 8 input
// lines, two from each of N, E, S, W (index dir*2+line), and 8 output lines,
// each driven by an 8-input multiplexer whose select 0..5 picks the six lines
// of the three other directions (in N, E, S, W order), 6 the molecule output
// and 7 a constant '0'.
//
// Modes modelled:
//   MOL_LUT4      output = lut[{i3,i2,i1,i0}]
//   MOL_SHIFT     16-bit shift register, serial input i0, output lut[15]
//   MOL_ROUTE_OUT net source: i0 is sent to the routing unit; the LUT holds
//                 the 16-bit identifier of the net
//   MOL_ROUTE_IN  net target: the output is the routing unit's value; the LUT
//                 holds the identifier of the source to connect to
// In the two route modes the identifier is read serially: rt_id_bit is
// lut[15] and every rt_id_shift rotates the LUT by one place, so after ID_W
// shifts it is back where it started. `init` says whether the molecule starts
// a connection or waits for one.
//
// Configuration: a serial chain of MOL_CFG_W bits (struct mol_cfg_t), shifted
// MSB first from cfg_in while cfg_en is high; cfg_out is the chain's last bit.
// The configuration is cleared by reset, and the switch box outputs are held
// at '0' while reset is asserted, so that a fabric whose configuration memory
// powers up at random cannot form oscillating loops through its neighbours. While cfg_en is high the molecule
// never asks for a connection, so half-shifted words cannot start routing.
//
// The LUT/flip-flop structure, the 8+8 line switch box with 8-input
// multiplexers and the identifier held in the LUT as a shift register follow
// the document. The line numbering, the multiplexer input order, the
// configuration chain format and the choice of i0 as the routed value are
// choices of this design. The two-3-LUT mode, the mode that reconfigures
// other molecules and the remaining operational modes are not modelled.
module poetic_molecule
  import hidra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_en,
  input  logic       cfg_in,
  output logic       cfg_out,
  input  logic [7:0] sw_in,
  output logic [7:0] sw_out,
  // routing unit side (through the interface)
  output role_e      rt_role,
  output logic       rt_init,
  output logic       rt_id_bit,
  input  logic       rt_id_shift,
  output logic       rt_val,      // value sent into the routing plane
  input  logic       rt_val_in,   // value received from the routing plane
  output logic       mol_out
);
  mol_cfg_t   cfg_q;
  logic [3:0] li;
  logic       f, ff_q;

  always_comb begin
    for (int i = 0; i < 4; i++) li[i] = sw_in[cfg_q.in_sel[i]];
    unique case (cfg_q.mode)
      MOL_LUT4:      f = cfg_q.lut[li];
      MOL_SHIFT:     f = cfg_q.lut[15];
      MOL_ROUTE_IN:  f = rt_val_in;
      default:       f = li[0];
    endcase
    mol_out = (cfg_q.seq && cfg_q.mode != MOL_SHIFT) ? ff_q : f;
  end

  always_comb begin
    for (int o = 0; o < 8; o++) begin
      automatic int d = o / 2;
      automatic int s = int'(cfg_q.sb_sel[o]);
      sw_out[o] = 1'b0;
      if (s < 6) begin
        // k-th other direction, skipping d
        automatic int od = (s / 2) + (((s / 2) >= d) ? 1 : 0);
        sw_out[o] = sw_in[od * 2 + (s % 2)];
      end else if (s == 6) begin
        sw_out[o] = mol_out;
      end
      if (!rst_n) sw_out[o] = 1'b0;
    end
  end

  assign rt_role   = (cfg_q.mode == MOL_ROUTE_OUT) ? ROLE_SOURCE :
                     (cfg_q.mode == MOL_ROUTE_IN)  ? ROLE_TARGET : ROLE_NONE;
  assign rt_init   = cfg_q.init && (rt_role != ROLE_NONE) && !cfg_en;
  assign rt_id_bit = cfg_q.lut[15];
  assign rt_val    = (cfg_q.mode == MOL_ROUTE_OUT) ? li[0] : 1'b0;
  assign cfg_out   = cfg_q[MOL_CFG_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
      ff_q  <= 1'b0;
    end else begin
      ff_q <= f;
      if (cfg_en)
        cfg_q <= {cfg_q[MOL_CFG_W-2:0], cfg_in};
      else if (cfg_q.mode == MOL_SHIFT)
        cfg_q.lut <= {cfg_q.lut[14:0], li[0]};
      else if (rt_role != ROLE_NONE && rt_id_shift)
        cfg_q.lut <= {cfg_q.lut[14:0], cfg_q.lut[15]};
    end
  end

endmodule
