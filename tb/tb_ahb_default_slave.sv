// tb_ahb_default_slave: IDLE and BUSY transfers to no slave get a zero-wait
// OKAY; NONSEQ and SEQ get the two-cycle ERROR (HREADY low then high, HRESP
// ERROR in both). Also checks that the slave ignores transfers while HREADY
// is low and when it is not selected, and that it moves only on hclk_en.
module tb_ahb_default_slave;
  import ahb_pkg::*;
  logic dclk = 0, rst_n = 0, hclk_en = 0;
  always #5 dclk = ~dclk;
  logic hsel, hready;
  logic [1:0] htrans;
  ahb_s2m_t resp;
  int checks = 0, failures = 0;
  int st;   // reference: 0 okay, 1 first error cycle, 2 second

  ahb_default_slave dut (.*);

  initial begin
    hsel = 0; hready = 1; htrans = HTRANS_IDLE; st = 0;
    repeat (2) @(negedge dclk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      hclk_en = ($urandom_range(0, 2) == 0);
      hsel    = $urandom_range(0, 1);
      htrans  = 2'($urandom_range(0, 3));
      hready  = (st == 1) ? 1'b0 : 1'b1;     // the bus follows this slave
      if ($urandom_range(0, 3) == 0) hready = 0; // or another slave stalls
      @(posedge dclk);
      if (hclk_en) begin
        if (st == 1) st = 2;
        else st = (hready && hsel && htrans[1]) ? 1 : 0;
      end
      @(negedge dclk);
      checks++;
      if (resp.hreadyout !== (st != 1) ||
          resp.hresp !== ((st == 0) ? HRESP_OKAY : HRESP_ERROR) ||
          resp.hrdata !== '0) begin
        failures++;
        if (failures < 10) $display("FAIL st=%0d ready=%b resp=%0d", st, resp.hreadyout, resp.hresp);
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
