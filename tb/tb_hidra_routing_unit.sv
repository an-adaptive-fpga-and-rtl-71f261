// Self-checking test of the routing unit: two units side by side (A west,
// B east) wired as in the plane, with the trigger from hidra_trigger. B is a
// target that starts a process towards source A with the same identifier.
// Checks: connection after 1+16+1+1+1 = 20 cycles; during the process the
// val_out multiplexers carry the controller's value, not the switchbox's;
// afterwards data from A's element reaches B's element through A's east
// multiplexer and B's element multiplexer, and unconfigured outputs stay '0'.
module tb_hidra_routing_unit;
  import hidra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic trigger;
  logic [3:0] a_vout, b_vout, a_pout, b_pout, a_vin, b_vin, a_pin, b_pin;
  role_e a_role, b_role;
  logic a_init, b_init, a_sh, b_sh, a_ev, b_ev, a_eo, b_eo, a_c, b_c, a_f, b_f;
  logic [15:0] a_id, b_id;
  ru_state_e a_st, b_st;
  int checks = 0, failures = 0;

  assign a_vin = 4'(b_vout[DIR_W]) << DIR_E;
  assign b_vin = 4'(a_vout[DIR_E]) << DIR_W;
  assign a_pin = 4'(b_pout[DIR_W]) << DIR_E;
  assign b_pin = 4'(a_pout[DIR_E]) << DIR_W;

  hidra_routing_unit ua (.clk, .rst_n, .trigger, .val_in(a_vin), .val_out(a_vout),
    .prop_in(a_pin), .prop_out(a_pout), .el_role(a_role), .el_init(a_init),
    .el_id_bit(a_id[15]), .el_id_shift(a_sh), .el_val_in(a_ev), .el_val_out(a_eo),
    .connected(a_c), .failed(a_f), .state(a_st));
  hidra_routing_unit ub (.clk, .rst_n, .trigger, .val_in(b_vin), .val_out(b_vout),
    .prop_in(b_pin), .prop_out(b_pout), .el_role(b_role), .el_init(b_init),
    .el_id_bit(b_id[15]), .el_id_shift(b_sh), .el_val_in(b_ev), .el_val_out(b_eo),
    .connected(b_c), .failed(b_f), .state(b_st));
  hidra_trigger #(.ID_W(16), .EXP_LIMIT(2)) ut (.clk, .rst_n, .state(a_st), .trigger);

  always_ff @(posedge clk) begin
    if (a_sh) a_id <= {a_id[14:0], a_id[15]};
    if (b_sh) b_id <= {b_id[14:0], b_id[15]};
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int c;
    a_role = ROLE_SOURCE; b_role = ROLE_TARGET; a_init = 0; b_init = 0;
    a_ev = 1; b_ev = 0; a_id = 16'h3C5A; b_id = 16'h3C5A;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    @(posedge clk); #1;
    check(a_vout == 0 && b_eo == 0, "no path before routing");
    b_init = 1;
    for (c = 1; c < 60; c++) begin
      @(posedge clk); #1;
      if (a_st == ST_ROLE) check(a_vout[DIR_E] == 1'b0, "controller owns val_out during process");
      if (b_c) break;
    end
    check(c == 20, $sformatf("connected after %0d cycles", c));
    check(a_c && b_c && !a_f && !b_f, "both ends connected");
    b_init = 0;
    for (int v = 0; v < 4; v++) begin
      a_ev = 1'(v % 2);
      #1;
      check(b_eo == a_ev, "data A element -> B element");
      check(a_vout[DIR_E] == a_ev && a_vout[DIR_N] == 0 && a_vout[DIR_W] == 0 && a_vout[DIR_S] == 0, "only east mux of A drives");
      check(b_vout == 0 && a_eo == 0, "B forwards nothing, A element mux free");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
