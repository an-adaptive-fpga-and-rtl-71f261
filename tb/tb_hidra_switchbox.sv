// Self-checking test of the switchbox: random configurations and inputs are
// compared with the selection rule (unconfigured -> 0; neighbour multiplexer
// d with select d -> element; otherwise the selected neighbour input).
module tb_hidra_switchbox;
  import hidra_pkg::*;
  mux_cfg_t [4:0] cfg;
  logic [3:0] vin, sw;
  logic el_in, el_out;
  logic exp_v;
  int checks = 0, failures = 0;

  hidra_switchbox dut (.mux_cfg(cfg), .val_in(vin), .el_in, .sw_out(sw), .el_out);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      cfg = 15'($urandom); vin = 4'($urandom); el_in = 1'($urandom);
      #1;
      for (int d = 0; d < 4; d++) begin
        exp_v = !cfg[d].cfg ? 1'b0 : (int'(cfg[d].sel) == d) ? el_in : vin[cfg[d].sel];
        checks++;
        if (sw[d] !== exp_v) failures++;
      end
      checks++;
      if (el_out !== (cfg[4].cfg & vin[cfg[4].sel])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
