// Self-checking test of the routing-unit controller. The testbench plays the
// neighbours, the logic element and the trigger. Two controllers get the same
// stimulus: basic HIDRA (index 0) and the line-search RT variant (index 1).
//  1  source that starts a process: election, identifier on the prop lines,
//     role '1', expansion on all four sides, traceback from the east sets the
//     east multiplexer to the element and the connected flag.
//  2  relay reached from the south: no output on the arrival cycle for
//     HIDRA, a line to the north in the same cycle for RT; then expansion to
//     N and W only (E is taken by path 1); traceback from the north sets
//     mux N to select S.
//  3  relay reached from the west: N and E are taken, only S is sent.
//  4  after a reset, target that starts a process and is reached from the west: trace state
//     drives the prop lines and the west val line, then element mux = W.
module tb_hidra_controller;
  import hidra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic trigger, el_init;
  role_e el_role;
  logic [15:0] id;
  logic [3:0] prop_in, val_in;
  logic [1:0] shift, connected, failed, active;
  logic [3:0] prop_out [2], ctrl_val [2];
  mux_cfg_t [4:0] mux [2];
  ru_state_e st [2];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 2; i++) begin : g_dut
    hidra_controller #(.ALGO(i == 0 ? ALG_HIDRA : ALG_RT)) dut (
      .clk, .rst_n, .trigger, .el_role, .el_init, .el_id_bit(id[15]),
      .el_id_shift(shift[i]), .connected(connected[i]), .failed(failed[i]),
      .prop_in, .prop_out(prop_out[i]), .val_in, .ctrl_val(ctrl_val[i]),
      .ctrl_active(active[i]), .mux_cfg(mux[i]), .state(st[i])
    );
  end

  always_ff @(posedge clk) if (shift[0]) id <= {id[14:0], id[15]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask
  task automatic cyc(); @(posedge clk); #1; endtask

  // identifier phase: 16 cycles, trigger on the last; `bits` driven on prop S
  task automatic id_phase(input logic [15:0] bits, input bit master);
    for (int i = 15; i >= 0; i--) begin
      prop_in = master ? 4'b0 : {1'b0, bits[i], 2'b0};
      trigger = (i == 0);
      #1;
      for (int k = 0; k < 2; k++) begin
        check(st[k] == ST_ID && shift[k], "id phase state/shift");
        if (master) check(prop_out[k] == {4{id[15]}}, "master sends its id");
      end
      cyc();
    end
    trigger = 0;
  endtask

  initial begin
    trigger = 0; el_init = 0; el_role = ROLE_NONE; id = 16'hBEEF;
    prop_in = 0; val_in = 0;
    cyc(); rst_n = 1; cyc();

    // ---- 1: source, master
    el_role = ROLE_SOURCE; el_init = 1;
    #1;
    for (int k = 0; k < 2; k++) check(prop_out[k] == 4'hF && !active[k], "1 request on prop");
    cyc();
    id_phase(16'h0, 1);
    for (int k = 0; k < 2; k++) check(st[k] == ST_ROLE && prop_out[k] == 4'hF, "1 role: source");
    cyc();
    for (int c = 0; c < 3; c++) begin
      for (int k = 0; k < 2; k++) check(st[k] == ST_EXPAND && active[k] && ctrl_val[k] == 4'hF, "1 root expands");
      cyc();
    end
    prop_in = 4'b0010; val_in = 4'b0010;  // end, traceback from E
    #1;
    for (int k = 0; k < 2; k++) check(ctrl_val[k] == 4'h0, "1 root does not forward");
    cyc();
    prop_in = 0; val_in = 0; el_init = 0;
    for (int k = 0; k < 2; k++) begin
      check(st[k] == ST_IDLE && connected[k] && !active[k], "1 connected");
      check(mux[k][DIR_E] == '{cfg: 1'b1, sel: DIR_E} && mux[k][DIR_N].cfg == 1'b0, "1 mux E = element");
    end
    check(id == 16'hBEEF, "1 identifier restored after 16 shifts");

    // ---- 2: relay reached from S
    el_role = ROLE_NONE;
    prop_in = 4'b0100; cyc();
    for (int k = 0; k < 2; k++) check(st[k] == ST_ID, "2 follows election");
    id_phase(16'h1234, 0);
    prop_in = 4'b0100; cyc();  // role: master is a source
    prop_in = 0;
    #1; for (int k = 0; k < 2; k++) check(ctrl_val[k] == 0, "2 idle before wave");
    cyc();
    val_in = 4'b0100;
    #1;
    check(ctrl_val[0] == 4'b0000, "2 HIDRA waits one cycle");
    check(ctrl_val[1] == 4'b0001, "2 RT line to the north");
    cyc();
    val_in = 0;
    #1; for (int k = 0; k < 2; k++) check(ctrl_val[k] == 4'b1001, "2 expand N,W (E taken)");
    cyc();
    prop_in = 4'b0001; val_in = 4'b0001;
    #1; for (int k = 0; k < 2; k++) check(ctrl_val[k] == 4'b0100, "2 traceback to S");
    cyc();
    prop_in = 0; val_in = 0;
    for (int k = 0; k < 2; k++) check(mux[k][DIR_N] == '{cfg: 1'b1, sel: DIR_S} && !connected[k] == 0, "2 mux N = S");

    // ---- 3: relay reached from W
    prop_in = 4'b1000; cyc();
    id_phase(16'h1234, 0);
    prop_in = 4'b1000; cyc();
    prop_in = 0; val_in = 4'b1000; cyc();
    val_in = 0;
    #1; for (int k = 0; k < 2; k++) check(ctrl_val[k] == 4'b0100, "3 only S free");
    trigger = 1;  // time-out ends the process
    cyc(); trigger = 0;
    for (int k = 0; k < 2; k++) check(st[k] == ST_IDLE && !failed[k], "3 time-out, not master");

    // ---- 4: target, master, reached from W (fresh unit)
    rst_n = 0; cyc(); rst_n = 1;
    el_role = ROLE_TARGET; el_init = 1; id = 16'hCAFE;
    #1; for (int k = 0; k < 2; k++) check(prop_out[k] == 4'hF, "4 request");
    cyc();
    id_phase(16'h0, 1);
    for (int k = 0; k < 2; k++) check(prop_out[k] == 4'h0, "4 role: target");
    cyc();
    cyc();
    val_in = 4'b1000; cyc(); val_in = 0;
    for (int k = 0; k < 2; k++) check(st[k] == ST_TRACE && prop_out[k] == 4'hF && ctrl_val[k] == 4'b1000, "4 trace");
    cyc();
    for (int k = 0; k < 2; k++) check(mux[k][4] == '{cfg: 1'b1, sel: DIR_W} && connected[k], "4 element mux = W");

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
