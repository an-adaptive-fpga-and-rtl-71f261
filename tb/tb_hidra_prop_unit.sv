// Self-checking test of the propagation unit: all 32 input combinations are
// compared with the forwarding table (own -> all; W -> N,S,E; E -> N,S,W;
// S -> N; N -> S) and with the master/receive outputs.
module tb_hidra_prop_unit;
  logic       own, rx, lower;
  logic [3:0] pin, pout, exp_out;
  int checks = 0, failures = 0;

  hidra_prop_unit dut (.own, .prop_in(pin), .prop_out(pout), .rx, .lower);

  initial begin
    for (int v = 0; v < 32; v++) begin
      {own, pin} = 5'(v);
      #1;
      exp_out = own ? 4'hF : 4'h0;
      if (pin[3]) exp_out |= 4'b0111;  // from west: N, E, S
      if (pin[1]) exp_out |= 4'b1101;  // from east: N, S, W
      if (pin[2]) exp_out |= 4'b0001;  // from south: N
      if (pin[0]) exp_out |= 4'b0100;  // from north: S
      checks += 3;
      if (pout !== exp_out) begin failures++; $display("v=%0d out=%b exp=%b", v, pout, exp_out); end
      if (rx !== (|pin)) failures++;
      if (lower !== (pin[2] | pin[3])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
