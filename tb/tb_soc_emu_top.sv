// tb_soc_emu_top: end-to-end test of the split AHB bus at default size.
//
// Three masters and three slaves in the default split (M0, S0, S1 with the
// arbiter and decoder in partition 0; M1, M2, S2 in partition 1), all
// parameters of the top at their defaults. Each master model runs random
// bursts to every slave and to an unmapped region and checks every
// response against its own shadow memory. On every AHB edge the testbench
// also checks that the two bus copies agree field by field, that the AHB
// period is DIV = 5 link cycles, and that no link line is driven twice. It
// counts how often each mechanism of the split bus occurred and fails any
// that never did: transfers for all four master/slave partition pairs, reads
// and writes whose data crossed the link, wait states from a slave on either
// side, ERROR responses to a master in the far partition, address phases of
// one master overlapping the data phase of another across the link, and
// mastership passing between the partitions.
module tb_soc_emu_top;
  import ahb_pkg::*;

  localparam int NM = 3;
  localparam int NS = 3;
  localparam logic [MAX_MASTERS-1:0] P0M = 8'h01;
  localparam logic [MAX_SLAVES-1:0]  P0S = 16'h0003;
  localparam int DIV = 5;

  logic dclk = 0, rst_n = 0;
  always #5 dclk = ~dclk;

  logic hclk_en;
  ahb_m2s_t [MAX_MASTERS-1:0] m_out;
  ahb_s2m_t [MAX_SLAVES-1:0]  s_out;
  ahb_bus_t bus0, bus1;
  logic [W-1:0] link, link_conflict;

  soc_emu_top dut (.*);

  logic [NM-1:0] mdone;
  int mchk[NM], mfail[NM], merr[NM], mrd[NM], mwr[NM];

  for (genvar i = 0; i < NM; i++) begin : g_m
    ahb_master_model #(.ID(i), .NUM_SLAVES(NS), .NUM_BURSTS(40)) u_m (
      .dclk, .rst_n, .hclk_en, .bus(P0M[i] ? bus0 : bus1), .m(m_out[i]),
      .done(mdone[i]), .checks(mchk[i]), .failures(mfail[i]),
      .n_err(merr[i]), .n_rd(mrd[i]), .n_wr(mwr[i]));
  end
  for (genvar i = NM; i < MAX_MASTERS; i++) begin : g_mz
    assign m_out[i] = '0;
  end
  for (genvar j = 0; j < NS; j++) begin : g_s
    ahb_slave_model #(.ID(j), .MAX_WAIT(2)) u_s (
      .dclk, .rst_n, .hclk_en, .bus(P0S[j] ? bus0 : bus1), .s(s_out[j]));
  end
  for (genvar j = NS; j < MAX_SLAVES; j++) begin : g_sz
    assign s_out[j] = '0;
  end

  int checks = 0, failures = 0;

  // mechanism counters
  int n_pair[2][2];          // [master partition][slave partition]
  int n_rd_x, n_wr_x, n_wait[2], n_err_remote, n_overlap, n_handover;

  // data-phase view kept by the testbench from bus0
  logic          d_valid, d_write;
  logic [MW-1:0] d_master;
  int            d_slave;      // -1: default slave
  int            since_en;
  bit            seen_en;
  logic [MW-1:0] last_master;

  function automatic int mpart(logic [MW-1:0] i);
    return P0M[i[2:0]] ? 0 : 1;
  endfunction
  function automatic int sidx(logic [MAX_SLAVES-1:0] hs);
    for (int j = 0; j < MAX_SLAVES; j++) if (hs[j]) return j;
    return -1;
  endfunction
  function automatic int spart(int j);
    return (j < 0 || P0S[j]) ? 0 : 1;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge dclk) if (rst_n) begin
    chk(link_conflict == '0, "link conflict");
    since_en <= hclk_en ? 1 : since_en + 1;
    if (hclk_en) begin
      if (seen_en) chk(since_en == DIV, "AHB period");
      seen_en <= 1'b1;
      // the two bus copies must agree on every AHB edge
      chk(bus0.hmaster == bus1.hmaster && bus0.hgrant == bus1.hgrant &&
          bus0.hmastlock == bus1.hmastlock, "arbiter fields");
      chk(bus0.hbusreq == bus1.hbusreq && bus0.hlock == bus1.hlock, "requests");
      chk(bus0.haddr == bus1.haddr && bus0.htrans == bus1.htrans &&
          bus0.hwrite == bus1.hwrite && bus0.hsize == bus1.hsize &&
          bus0.hburst == bus1.hburst && bus0.hprot == bus1.hprot, "address phase");
      chk(bus0.hsel == bus1.hsel, "HSEL");
      chk(bus0.hready == bus1.hready && bus0.hresp == bus1.hresp, "response");
      if (d_valid && d_write)  chk(bus0.hwdata == bus1.hwdata, "HWDATA");
      if (d_valid && !d_write) chk(bus0.hrdata == bus1.hrdata, "HRDATA");

      if (d_valid && !bus0.hready) n_wait[spart(d_slave)]++;
      if (d_valid && bus0.hready) begin
        if (mpart(d_master) != spart(d_slave) && d_slave >= 0) begin
          if (d_write) n_wr_x++; else n_rd_x++;
        end
        if (bus0.hresp == HRESP_ERROR && mpart(d_master) == 1) n_err_remote++;
      end
      if (bus0.hready) begin
        if (bus0.htrans[1]) begin
          n_pair[mpart(bus0.hmaster)][spart(sidx(bus0.hsel))]++;
          if (d_valid && d_master != bus0.hmaster) n_overlap++;
          if (bus0.hmaster != last_master && mpart(bus0.hmaster) != mpart(last_master))
            n_handover++;
          last_master <= bus0.hmaster;
        end
        d_valid  <= bus0.htrans[1];
        d_write  <= bus0.hwrite;
        d_master <= bus0.hmaster;
        d_slave  <= sidx(bus0.hsel);
      end
    end
  end

  initial begin
    d_valid = 0; d_write = 0; d_master = '0; d_slave = -1; since_en = 0; seen_en = 0; last_master = '0;
    n_rd_x = 0; n_wr_x = 0; n_err_remote = 0; n_overlap = 0; n_handover = 0;
    for (int a = 0; a < 2; a++) begin
      n_wait[a] = 0;
      for (int b = 0; b < 2; b++) n_pair[a][b] = 0;
    end
    repeat (3) @(posedge dclk);
    rst_n = 1;
    wait (&mdone);
    repeat (20) @(posedge dclk);
    for (int i = 0; i < NM; i++) begin
      checks += mchk[i];
      failures += mfail[i];
      $display("master %0d: %0d transfers checked, %0d reads, %0d writes, %0d errors, %0d failures",
               i, mchk[i], mrd[i], mwr[i], merr[i], mfail[i]);
    end
    $display("pairs M0S0=%0d M0S1=%0d M1S0=%0d M1S1=%0d", n_pair[0][0], n_pair[0][1], n_pair[1][0], n_pair[1][1]);
    $display("cross reads=%0d cross writes=%0d waits p0=%0d p1=%0d remote errors=%0d overlaps=%0d handovers=%0d",
             n_rd_x, n_wr_x, n_wait[0], n_wait[1], n_err_remote, n_overlap, n_handover);
    for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++) chk(n_pair[a][b] > 0, "partition pair seen");
    chk(n_rd_x > 0, "read across link");
    chk(n_wr_x > 0, "write across link");
    chk(n_wait[0] > 0, "wait state, partition 0 slave");
    chk(n_wait[1] > 0, "wait state, partition 1 slave");
    chk(n_err_remote > 0, "ERROR to far master");
    chk(n_overlap > 0, "overlapping phases of two masters");
    chk(n_handover > 0, "mastership handover between partitions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge dclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
