// tb_bs_rx: random link words and strobes; each register must load the
// link on the clock edge of its own micro-cycle only, and clear on reset.
module tb_bs_rx;
  logic dclk = 0, rst_n = 0;
  always #5 dclk = ~dclk;
  logic [3:0]        e;
  logic [31:0]       ext_in;
  logic [3:0][31:0]  rx;
  logic [31:0]       model [4];
  int checks = 0, failures = 0;

  bs_rx dut (.*);

  initial begin
    e = '0; ext_in = '0;
    for (int i = 0; i < 4; i++) model[i] = '0;
    repeat (2) @(negedge dclk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (rx[i] !== 32'h0) failures++;
    end
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int k;
      k = $urandom_range(0, 4);
      e = (k < 4) ? 4'(1 << k) : 4'b0;
      ext_in = $urandom;
      @(posedge dclk);
      if (k < 4) model[k] = ext_in;
      @(negedge dclk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (rx[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: %h vs %h", i, rx[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge dclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
