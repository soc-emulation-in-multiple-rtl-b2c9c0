// tb_bs_sequencer: checks the micro-cycle strobes and the AHB clock enable.
// A reference phase counter runs beside two sequencers (DIV = 5, the
// default, and DIV = 7); in every cycle exactly the strobe of the current
// micro-cycle must be high, and hclk_en only in the last cycle of a period.
module tb_bs_sequencer;
  logic dclk = 0, rst_n = 0;
  always #5 dclk = ~dclk;
  logic [3:0] e5, e7;
  logic en5, en7;
  logic [2:0] ph5, ph7;
  int checks = 0, failures = 0;
  int ref5 = 0, ref7 = 0, periods = 0;

  bs_sequencer            u5 (.dclk, .rst_n, .e(e5), .hclk_en(en5), .phase(ph5));
  bs_sequencer #(.DIV(7)) u7 (.dclk, .rst_n, .e(e7), .hclk_en(en7), .phase(ph7));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s ref5=%0d ref7=%0d", what, ref5, ref7); end
  endtask

  initial begin
    repeat (2) @(negedge dclk);
    rst_n = 1;
    for (int c = 0; c < 140; c++) begin
      chk(e5 == ((ref5 < 4) ? 4'(1 << ref5) : 4'b0), "e, DIV=5");
      chk(en5 == (ref5 == 4), "hclk_en, DIV=5");
      chk(e7 == ((ref7 < 4) ? 4'(1 << ref7) : 4'b0), "e, DIV=7");
      chk(en7 == (ref7 == 6), "hclk_en, DIV=7");
      if (en5) periods++;
      @(negedge dclk);
      ref5 = (ref5 + 1) % 5;
      ref7 = (ref7 + 1) % 7;
    end
    chk(periods == 28, "140 link cycles = 28 AHB periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge dclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
