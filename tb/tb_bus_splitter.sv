// tb_bus_splitter: two bus splitters joined by the 32-line link.
//
// A central splitter (master 0, slaves 0 and 1, arbiter and decoder outputs
// from the testbench) and a remote one (masters 1 and 2, slave 2) share one
// wired link. The testbench steps the micro-cycles itself and changes every
// source (masters, slaves, arbiter, decoder, default slave) only right after
// an AHB edge, as registered sources would. On every AHB edge both bus
// copies must equal the value the sources define, the link must have had
// exactly one driver per line in each micro-cycle, and none in the spare
// cycle. The exchange must fit in the five link cycles of an AHB period.
module tb_bus_splitter;
  import ahb_pkg::*;
  logic dclk = 0, rst_n = 0;
  always #5 dclk = ~dclk;

  logic [3:0] e;
  logic hclk_en;
  int phase;
  ahb_m2s_t [MAX_MASTERS-1:0] m_out;
  ahb_s2m_t [MAX_SLAVES-1:0]  s_out;
  ahb_s2m_t def_out;
  logic [MAX_MASTERS-1:0] arb_hgrant;
  logic [MW-1:0] arb_hmaster;
  logic arb_hmastlock;
  logic [MAX_SLAVES-1:0] dec_hsel;
  logic [31:0] out_c, oe_c, out_r, oe_r, link;
  ahb_bus_t bus_c, bus_r;

  assign link = (out_c & oe_c) | (out_r & oe_r);
  always_comb begin
    e = (phase < 4) ? 4'(1 << phase) : 4'b0;
    hclk_en = (phase == 4);
  end

  bus_splitter #(.IS_CENTRAL(1'b1), .LOCAL_MASTERS(8'h01), .LOCAL_SLAVES(16'h0003)) u_c (
    .dclk, .rst_n, .e, .hclk_en, .m_out, .s_out, .def_out, .arb_hgrant, .arb_hmaster,
    .arb_hmastlock, .dec_hsel, .ext_in(link), .ext_out(out_c), .ext_oe(oe_c), .bus(bus_c));
  bus_splitter #(.IS_CENTRAL(1'b0), .LOCAL_MASTERS(8'h06), .LOCAL_SLAVES(16'h0004)) u_r (
    .dclk, .rst_n, .e, .hclk_en, .m_out, .s_out, .def_out, .arb_hgrant, .arb_hmaster,
    .arb_hmastlock, .dec_hsel, .ext_in(link), .ext_out(out_r), .ext_oe(oe_r), .bus(bus_r));

  int checks = 0, failures = 0;
  int hm_d; logic [15:0] hs_d; bit hw_d;
  int n_rd_remote = 0, n_wr_remote = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_copy(ahb_bus_t b, string side);
    int sj;
    chk(b.hmaster == arb_hmaster && b.hgrant == arb_hgrant && b.hmastlock == arb_hmastlock,
        {side, " arbiter fields"});
    for (int i = 0; i < 3; i++)
      chk(b.hbusreq[i] == m_out[i].hbusreq && b.hlock[i] == m_out[i].hlock, {side, " request"});
    chk(b.hbusreq[7:3] == 0 && b.hlock[7:3] == 0, {side, " unused requests"});
    chk(b.haddr == m_out[arb_hmaster].haddr && b.hwrite == m_out[arb_hmaster].hwrite &&
        b.htrans == m_out[arb_hmaster].htrans && b.hsize == m_out[arb_hmaster].hsize &&
        b.hburst == m_out[arb_hmaster].hburst && b.hprot == m_out[arb_hmaster].hprot,
        {side, " address phase"});
    chk(b.hsel == dec_hsel, {side, " HSEL"});
    sj = -1;
    for (int j = 0; j < 3; j++) if (hs_d[j]) sj = j;
    if (sj < 0) chk(b.hready == def_out.hreadyout && b.hresp == def_out.hresp, {side, " default response"});
    else        chk(b.hready == s_out[sj].hreadyout && b.hresp == s_out[sj].hresp, {side, " response"});
    if (hw_d) chk(b.hwdata == m_out[hm_d].hwdata, {side, " HWDATA"});
    else      chk(b.hrdata == ((sj < 0) ? def_out.hrdata : s_out[sj].hrdata), {side, " HRDATA"});
  endtask

  always @(posedge dclk) if (rst_n) begin
    if (phase < 4) chk((oe_c & oe_r) == 0 && (oe_c | oe_r) == 32'hFFFF_FFFF, "one driver per line");
    else           chk((oe_c | oe_r) == 0, "spare cycle undriven");
  end

  initial begin
    phase = 0; hm_d = 0; hs_d = 0; hw_d = 0;
    m_out = '0; s_out = '0; def_out = '0;
    arb_hgrant = 8'h01; arb_hmaster = '0; arb_hmastlock = 0; dec_hsel = '0;
    def_out.hreadyout = 1;
    repeat (2) @(negedge dclk);
    rst_n = 1;
    for (int p = 0; p < 2000; p++) begin
      // new register values of all sources, right after the AHB edge
      for (int i = 0; i < 3; i++) m_out[i] = {$urandom, $urandom, $urandom};
      for (int j = 0; j < 3; j++) s_out[j] = {$urandom, $urandom};
      def_out = {$urandom, $urandom};
      arb_hmaster = 4'($urandom_range(0, 2));
      arb_hgrant  = 8'(1 << $urandom_range(0, 2));
      arb_hmastlock = $urandom_range(0, 1);
      dec_hsel = ($urandom_range(0, 3) == 3) ? 16'h0 : 16'(1 << $urandom_range(0, 2));
      for (int c = 0; c < 4; c++) begin
        phase = c;
        @(negedge dclk);
      end
      // phase 4: hclk_en is high, the next posedge is the AHB edge
      phase = 4;
      #1;
      check_copy(bus_c, "central");
      check_copy(bus_r, "remote");
      if (hs_d[2] && !hw_d) n_rd_remote++;
      if (hw_d && hm_d != 0) n_wr_remote++;
      if (bus_c.hready) begin hm_d = int'(bus_c.hmaster); hs_d = bus_c.hsel; hw_d = bus_c.hwrite; end
      @(negedge dclk);
    end
    chk(n_rd_remote > 0 && n_wr_remote > 0, "remote reads and writes seen");
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
