// Self-checking test of the serial comparator: random 16-bit identifier pairs
// (half of them equal) are shifted in bit by bit and the match output on the
// last bit is compared with a direct comparison of the two words.
module tb_hidra_serial_cmp;
  logic clk = 0, clear, en, a, b, match;
  int checks = 0, failures = 0;

  hidra_serial_cmp dut (.clk, .clear, .en, .rx_bit(a), .id_bit(b), .match);
  always #5 clk = ~clk;

  initial begin
    logic [15:0] wa, wb;
    clear = 1; en = 0; a = 0; b = 0;
    @(posedge clk); #1;
    for (int t = 0; t < 200; t++) begin
      wa = 16'($urandom);
      wb = (t % 2) ? wa : 16'($urandom);
      if (t % 7 == 3) wb = wa ^ (16'h1 << (t % 16));
      clear = 1; en = 0;
      @(posedge clk); #1;
      clear = 0; en = 1;
      for (int i = 15; i >= 0; i--) begin
        a = wa[i]; b = wb[i];
        #1;
        if (i == 0) begin
          checks++;
          if (match !== (wa == wb)) begin failures++; $display("t=%0d %h %h m=%b", t, wa, wb, match); end
        end
        @(posedge clk); #1;
      end
      en = 0;
      #1;
      checks++;
      if (match !== (wa == wb)) failures++;  // result holds while disabled
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
