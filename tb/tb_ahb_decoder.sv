// tb_ahb_decoder: every region and random offsets; slave j is selected for
// addresses 0xj0000000..0xjFFFFFFF when j < NUM_SLAVES, nothing above.
module tb_ahb_decoder;
  import ahb_pkg::*;
  logic [31:0] haddr;
  logic [MAX_SLAVES-1:0] hsel, hsel5;
  int checks = 0, failures = 0;

  ahb_decoder                  dut  (.haddr, .hsel);
  ahb_decoder #(.NUM_SLAVES(5)) dut5 (.haddr, .hsel(hsel5));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(0, 15);
      haddr = {4'(r), 28'($urandom)};
      #1;
      checks += 2;
      if (hsel  !== ((r < 3) ? MAX_SLAVES'(1) << r : '0)) failures++;
      if (hsel5 !== ((r < 5) ? MAX_SLAVES'(1) << r : '0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
