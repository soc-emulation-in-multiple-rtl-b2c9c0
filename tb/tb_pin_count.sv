// tb_pin_count: the pin-count formula of a bus cut in two, for AHB.
//
// With a = 6, b = 2, c = 13, d = 1, e = 3 (AHB), W = 32 and four masters and
// four slaves outside the partition that holds the arbiter and decoder, a
// direct cut needs 581 pins and a cut through the bus splitter (before time
// multiplexing) 101, a reduction of 82 %. The split count grows by only b
// pins per extra master and d per extra slave, the direct one by b+c+2W and
// d+e+W. The time-multiplexed link then uses W = 32 lines, carrying
// NUM_MICRO * W = 128 bits per AHB period, which must hold every field of
// the link layout: 4+1+3*8 bits of arbitration, 32 address, 13 master
// control, 16 HSEL and 3 response bits, and 32 data bits.
module tb_pin_count;
  import ahb_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int pd, ps;
    pd = pins_direct  (AHB_A, AHB_B, AHB_C, AHB_D, AHB_E, W, 5, 1, 5, 1);
    ps = pins_bussplit(AHB_A, AHB_B, AHB_C, AHB_D, AHB_E, W, 5, 1, 5, 1);
    $display("direct %0d, bus split %0d, reduction %0d %%", pd, ps, 100 * (pd - ps) / pd);
    chk(pd == 581, "P_direct = 581");
    chk(ps == 101, "P_bussplit = 101");
    chk(100 * (pd - ps) / pd == 82, "82 % reduction");
    for (int k = 1; k < 10; k++) begin
      chk(pins_bussplit(AHB_A, AHB_B, AHB_C, AHB_D, AHB_E, W, k + 2, 1, 5, 1) -
          pins_bussplit(AHB_A, AHB_B, AHB_C, AHB_D, AHB_E, W, k + 1, 1, 5, 1) == AHB_B,
          "split grows by b per master");
      chk(pins_direct(AHB_A, AHB_B, AHB_C, AHB_D, AHB_E, W, 5, 1, k + 2, 1) -
          pins_direct(AHB_A, AHB_B, AHB_C, AHB_D, AHB_E, W, 5, 1, k + 1, 1) == AHB_D + AHB_E + W,
          "direct grows by d+e+W per slave");
    end
    chk(MW + 1 + 3 * MAX_MASTERS <= W, "word 1 holds the arbitration fields");
    chk(1 + 3 + 4 + MAX_SLAVES + 1 + 2 + 2 + 3 == W, "word 3 is exactly full");
    chk(1 + 3 + 4 + 2 + 3 == AHB_C && 1 + 2 == AHB_E, "c and e match the AHB fields carried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
