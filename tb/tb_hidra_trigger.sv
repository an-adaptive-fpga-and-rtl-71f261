// Self-checking test of the trigger: it must fire on exactly the ID_W-th cycle
// of the identifier phase, on the EXP_LIMIT-th cycle of an expansion phase,
// and never in other states or in an expansion cut short.
module tb_hidra_trigger;
  import hidra_pkg::*;
  localparam int ID_W = 16, LIM = 25;
  logic clk = 0, rst_n = 0, trig;
  ru_state_e st;
  int checks = 0, failures = 0;

  hidra_trigger #(.ID_W(ID_W), .EXP_LIMIT(LIM)) dut (.clk, .rst_n, .state(st), .trigger(trig));
  always #5 clk = ~clk;

  task automatic phase(ru_state_e s, int n, int fire_at);
    for (int i = 1; i <= n; i++) begin
      st = s; #1;
      checks++;
      if (trig !== (i == fire_at)) begin failures++; $display("%s cycle %0d trig=%b", s.name(), i, trig); end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    st = ST_IDLE;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      phase(ST_IDLE, 2, 0);
      phase(ST_ID, ID_W, ID_W);
      phase(ST_ROLE, 1, 0);
      phase(ST_EXPAND, (r == 1) ? 7 : LIM, (r == 1) ? 0 : LIM);
      phase(ST_TRACE, 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
