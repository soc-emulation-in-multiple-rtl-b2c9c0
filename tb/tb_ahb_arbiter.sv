// tb_ahb_arbiter: random requests, locks, HREADY and clock enables against a
// reference: on each enabled edge the grant goes to the lowest-numbered
// requester (master 0 if none) unless the address-phase master holds a
// locked request; HMASTER and HMASTLOCK follow the grant only when HREADY
// is high.
module tb_ahb_arbiter;
  import ahb_pkg::*;
  localparam int N = 4;
  logic dclk = 0, rst_n = 0, hclk_en = 0;
  always #5 dclk = ~dclk;
  logic [N-1:0] hbusreq, hlock, hgrant;
  logic hready, hmastlock;
  logic [MW-1:0] hmaster;
  int checks = 0, failures = 0, locks_kept = 0;
  logic [N-1:0] g;  // reference grant
  int m; bit ml;

  ahb_arbiter #(.NUM_MASTERS(N)) dut (.*);

  initial begin
    hbusreq = 0; hlock = 0; hready = 1; g = 1; m = 0; ml = 0;
    repeat (2) @(negedge dclk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [N-1:0] ng;
      int gi;
      hclk_en = $urandom_range(0, 1);
      hbusreq = N'($urandom);
      hlock   = N'($urandom) & N'($urandom);
      hready  = ($urandom_range(0, 3) != 0);
      @(posedge dclk);
      if (hclk_en) begin
        gi = 0;
        for (int i = 0; i < N; i++) if (g[i]) gi = i;
        if (hbusreq[m] && hlock[m] && g[m]) begin ng = g; locks_kept++; end
        else begin
          ng = 1;
          for (int i = 0; i < N; i++) if (hbusreq[i]) begin ng = N'(1) << i; break; end
        end
        if (hready) begin m = gi; ml = hlock[gi]; end
        g = ng;
      end
      @(negedge dclk);
      checks++;
      if (hgrant !== g || 32'(hmaster) != m || hmastlock !== ml) begin
        failures++;
        if (failures < 10) $display("FAIL grant %b/%b master %0d/%0d", hgrant, g, hmaster, m);
      end
    end
    checks++;
    if (locks_kept == 0) failures++;
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
