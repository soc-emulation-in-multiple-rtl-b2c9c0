// tb_bs_select: stage 1 of the bus splitter, central and remote instances.
//
// Random local master/slave outputs, arbiter/decoder outputs and received
// words. For both instances the bus copy and the ownership masks are
// compared with a reference that decodes the link words by their literal
// bit positions (word 1: HMASTER 31:28, HMASTLOCK 27, HGRANT 23:16, HLOCK
// 15:8, HBUSREQ 7:0; word 3: HWRITE 31, HSIZE 30:28, HPROT 27:24, HSEL 23:8,
// HREADY 7, HRESP 6:5, HTRANS 4:3, HBURST 2:0). The data-phase registers are
// tracked by the reference on every enabled edge with HREADY high.
module tb_bs_select;
  import ahb_pkg::*;
  logic dclk = 0, rst_n = 0, hclk_en = 0;
  always #5 dclk = ~dclk;

  ahb_m2s_t [MAX_MASTERS-1:0] m_out;
  ahb_s2m_t [MAX_SLAVES-1:0]  s_out;
  ahb_s2m_t def_out;
  logic [MAX_MASTERS-1:0] arb_hgrant;
  logic [MW-1:0] arb_hmaster;
  logic arb_hmastlock;
  logic [MAX_SLAVES-1:0] dec_hsel;
  logic [3:0][31:0] rx;
  ahb_bus_t bus_c, bus_r;
  logic [3:0][31:0] own_c, own_r;
  logic [MW-1:0] hm_d_c, hm_d_r;
  logic [MAX_SLAVES-1:0] hs_d_c, hs_d_r;
  logic hw_d_c, hw_d_r;

  bs_select #(.IS_CENTRAL(1'b1), .LOCAL_MASTERS(8'h01), .LOCAL_SLAVES(16'h0003)) u_c (
    .dclk, .rst_n, .hclk_en, .m_out, .s_out, .def_out, .arb_hgrant, .arb_hmaster,
    .arb_hmastlock, .dec_hsel, .rx, .bus(bus_c), .own(own_c), .hmaster_d(hm_d_c),
    .hsel_d(hs_d_c), .hwrite_d(hw_d_c));
  bs_select #(.IS_CENTRAL(1'b0), .LOCAL_MASTERS(8'h06), .LOCAL_SLAVES(16'h0004)) u_r (
    .dclk, .rst_n, .hclk_en, .m_out, .s_out, .def_out, .arb_hgrant, .arb_hmaster,
    .arb_hmastlock, .dec_hsel, .rx, .bus(bus_r), .own(own_r), .hmaster_d(hm_d_r),
    .hsel_d(hs_d_r), .hwrite_d(hw_d_r));

  int checks = 0, failures = 0;
  // reference data-phase state per instance: [0] central, [1] remote
  int ref_hm_d[2]; logic [15:0] ref_hs_d[2]; bit ref_hw_d[2];
  int n_remote_addr = 0, n_local_addr = 0, n_remote_resp = 0, n_local_resp = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference bus copy for one instance
  task automatic expect_bus(input bit central, input logic [2:0] lm, input logic [2:0] ls,
                            input int hmd, input logic [15:0] hsd, input bit hwd,
                            output ahb_bus_t b, output logic [3:0][31:0] o);
    int hm; bit amloc, dsloc, dmloc; int sj;
    b = '0;
    b.hmaster   = central ? arb_hmaster : rx[0][31:28];
    b.hmastlock = central ? arb_hmastlock : rx[0][27];
    b.hgrant    = central ? arb_hgrant : rx[0][23:16];
    o[0] = central ? 32'hFFFF_0000 : 32'h0;
    for (int i = 0; i < 8; i++) begin
      bit loc;
      loc = (i < 3) ? lm[i] : central;
      b.hbusreq[i] = loc ? ((i < 3) ? m_out[i].hbusreq : 1'b0) : rx[0][i];
      b.hlock[i]   = loc ? ((i < 3) ? m_out[i].hlock   : 1'b0) : rx[0][8+i];
      if (loc) begin o[0][i] = 1; o[0][8+i] = 1; end
    end
    hm = int'(b.hmaster);
    amloc = (hm < 3) ? lm[hm] : central;
    b.haddr  = amloc ? m_out[hm].haddr  : rx[1];
    b.hwrite = amloc ? m_out[hm].hwrite : rx[2][31];
    b.hsize  = amloc ? m_out[hm].hsize  : rx[2][30:28];
    b.hprot  = amloc ? m_out[hm].hprot  : rx[2][27:24];
    b.htrans = amloc ? m_out[hm].htrans : rx[2][4:3];
    b.hburst = amloc ? m_out[hm].hburst : rx[2][2:0];
    b.hsel   = central ? dec_hsel : rx[2][23:8];
    sj = -1;
    for (int j = 0; j < 3; j++) if (hsd[j]) sj = j;
    dsloc = (sj >= 0) ? ls[sj] : central;
    b.hready = dsloc ? ((sj >= 0) ? s_out[sj].hreadyout : def_out.hreadyout) : rx[2][7];
    b.hresp  = dsloc ? ((sj >= 0) ? s_out[sj].hresp     : def_out.hresp)     : rx[2][6:5];
    b.hrdata = dsloc ? ((sj >= 0) ? s_out[sj].hrdata    : def_out.hrdata)    : rx[3];
    dmloc = (hmd < 3) ? lm[hmd] : central;
    b.hwdata = dmloc ? m_out[hmd].hwdata : rx[3];
    o[1] = amloc ? 32'hFFFF_FFFF : 32'h0;
    o[2] = (amloc ? 32'hFF00_001F : 32'h0) | (central ? 32'h00FF_FF00 : 32'h0) |
           (dsloc ? 32'h0000_00E0 : 32'h0);
    o[3] = (hwd ? dmloc : dsloc) ? 32'hFFFF_FFFF : 32'h0;
  endtask

  initial begin
    ahb_bus_t eb; logic [3:0][31:0] eo;
    for (int k = 0; k < 2; k++) begin ref_hm_d[k] = 0; ref_hs_d[k] = 0; ref_hw_d[k] = 0; end
    m_out = '0; s_out = '0; def_out = '0; rx = '0;
    arb_hgrant = '0; arb_hmaster = '0; arb_hmastlock = 0; dec_hsel = '0;
    repeat (2) @(negedge dclk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // random stimulus, HMASTER and HSEL mostly in range
      for (int i = 0; i < 3; i++) m_out[i] = {$urandom, $urandom, $urandom};
      for (int j = 0; j < 3; j++) s_out[j] = {$urandom, $urandom};
      def_out = {$urandom, $urandom};
      for (int k = 0; k < 4; k++) rx[k] = $urandom;
      rx[0][31:28] = 4'($urandom_range(0, 3));
      rx[2][23:8]  = ($urandom_range(0, 3) == 3) ? 16'h0 : 16'(1 << $urandom_range(0, 2));
      arb_hmaster  = 4'($urandom_range(0, 2));
      arb_hgrant   = 8'(1 << $urandom_range(0, 2));
      arb_hmastlock = $urandom_range(0, 1);
      dec_hsel     = ($urandom_range(0, 3) == 3) ? 16'h0 : 16'(1 << $urandom_range(0, 2));
      hclk_en      = $urandom_range(0, 1);
      #1;
      expect_bus(1'b1, 3'b001, 3'b011, ref_hm_d[0], ref_hs_d[0], ref_hw_d[0], eb, eo);
      chk(bus_c == eb, "central bus copy");
      chk(own_c == eo, "central ownership");
      if (hclk_en && eb.hready) begin
        ref_hm_d[0] = int'(eb.hmaster); ref_hs_d[0] = eb.hsel; ref_hw_d[0] = eb.hwrite;
      end
      expect_bus(1'b0, 3'b110, 3'b100, ref_hm_d[1], ref_hs_d[1], ref_hw_d[1], eb, eo);
      chk(bus_r == eb, "remote bus copy");
      chk(own_r == eo, "remote ownership");
      if (eo[1] != 0) n_local_addr++; else n_remote_addr++;
      if (eo[2][7]) n_local_resp++; else n_remote_resp++;
      if (hclk_en && eb.hready) begin
        ref_hm_d[1] = int'(eb.hmaster); ref_hs_d[1] = eb.hsel; ref_hw_d[1] = eb.hwrite;
      end
      @(negedge dclk);
    end
    chk(n_remote_addr > 0 && n_local_addr > 0 && n_remote_resp > 0 && n_local_resp > 0, "coverage");
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
