// tb_three_fpga: one AHB bus replicated over three FPGAs on one 32-line link.
//
// The splitter's ownership rules need no change for more partitions: every
// partition drives the fields whose source it holds and listens to the
// rest. Partition 0 is central (arbiter, decoder, master 0, slave 0);
// partition 1 holds masters 1 and 2 and slave 1; partition 2 holds master 3
// and slaves 2 and 3. Four master models run random bursts to every slave
// and an unmapped region and check every response; on every AHB edge the
// three bus copies must agree, and no link line may have two drivers.
module tb_three_fpga;
  import ahb_pkg::*;
  localparam int NM = 4, NS = 4;
  localparam logic [7:0]  PM [3] = '{8'h01, 8'h06, 8'h08};
  localparam logic [15:0] PS [3] = '{16'h0001, 16'h0002, 16'h000C};

  logic dclk = 0, rst_n = 0;
  always #5 dclk = ~dclk;

  logic [2:0] en;
  ahb_m2s_t [MAX_MASTERS-1:0] m_out;
  ahb_s2m_t [MAX_SLAVES-1:0]  s_out;
  ahb_bus_t bus [3];
  logic [31:0] out [3], oe [3], link;
  assign link = (out[0] & oe[0]) | (out[1] & oe[1]) | (out[2] & oe[2]);

  for (genvar p = 0; p < 3; p++) begin : g_p
    fpga_partition #(.IS_CENTRAL(p == 0), .NUM_MASTERS(NM), .NUM_SLAVES(NS),
                     .LOCAL_MASTERS(PM[p]), .LOCAL_SLAVES(PS[p])) u_p (
      .dclk, .rst_n, .hclk_en(en[p]), .m_out, .s_out, .bus(bus[p]),
      .ext_in(link), .ext_out(out[p]), .ext_oe(oe[p]));
  end

  function automatic int mp(int i);
    for (int p = 0; p < 3; p++) if (PM[p][i]) return p;
    return 0;
  endfunction
  function automatic int sp(int j);
    for (int p = 0; p < 3; p++) if (PS[p][j]) return p;
    return 0;
  endfunction

  logic [NM-1:0] mdone;
  int mchk[NM], mfail[NM], merr[NM], mrd[NM], mwr[NM];
  for (genvar i = 0; i < NM; i++) begin : g_m
    ahb_master_model #(.ID(i), .NUM_SLAVES(NS), .NUM_BURSTS(25)) u_m (
      .dclk, .rst_n, .hclk_en(en[0]), .bus(bus[mp(i)]), .m(m_out[i]), .done(mdone[i]),
      .checks(mchk[i]), .failures(mfail[i]), .n_err(merr[i]), .n_rd(mrd[i]), .n_wr(mwr[i]));
  end
  for (genvar i = NM; i < MAX_MASTERS; i++) begin : g_mz
    assign m_out[i] = '0;
  end
  for (genvar j = 0; j < NS; j++) begin : g_s
    ahb_slave_model #(.ID(j)) u_s (.dclk, .rst_n, .hclk_en(en[0]), .bus(bus[sp(j)]), .s(s_out[j]));
  end
  for (genvar j = NS; j < MAX_SLAVES; j++) begin : g_sz
    assign s_out[j] = '0;
  end

  int checks = 0, failures = 0;
  int n_far[3];   // transfers whose master sits in partition p != slave's
  bit d_valid, d_write;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge dclk) if (rst_n) begin
    chk((oe[0] & oe[1]) == 0 && (oe[0] & oe[2]) == 0 && (oe[1] & oe[2]) == 0, "one driver");
    chk(en == 3'b000 || en == 3'b111, "sequencers in step");
    if (en[0]) begin
      for (int p = 1; p < 3; p++) begin
        chk(bus[p].hmaster == bus[0].hmaster && bus[p].hgrant == bus[0].hgrant &&
            bus[p].hbusreq == bus[0].hbusreq && bus[p].haddr == bus[0].haddr &&
            bus[p].htrans == bus[0].htrans && bus[p].hwrite == bus[0].hwrite &&
            bus[p].hsel == bus[0].hsel && bus[p].hready == bus[0].hready &&
            bus[p].hresp == bus[0].hresp, "copies agree");
        if (d_valid && d_write)  chk(bus[p].hwdata == bus[0].hwdata, "HWDATA agrees");
        if (d_valid && !d_write) chk(bus[p].hrdata == bus[0].hrdata, "HRDATA agrees");
      end
      if (bus[0].hready) begin
        if (bus[0].htrans[1]) begin
          int sj; sj = -1;
          for (int j = 0; j < NS; j++) if (bus[0].hsel[j]) sj = j;
          if (sj >= 0 && sp(sj) != mp(int'(bus[0].hmaster))) n_far[mp(int'(bus[0].hmaster))]++;
        end
        d_valid <= bus[0].htrans[1];
        d_write <= bus[0].hwrite;
      end
    end
  end

  initial begin
    d_valid = 0; d_write = 0;
    for (int p = 0; p < 3; p++) n_far[p] = 0;
    repeat (3) @(posedge dclk);
    rst_n = 1;
    wait (&mdone);
    repeat (10) @(posedge dclk);
    for (int i = 0; i < NM; i++) begin
      checks += mchk[i];
      failures += mfail[i];
    end
    $display("cross-partition transfers by master partition: %0d %0d %0d", n_far[0], n_far[1], n_far[2]);
    for (int p = 0; p < 3; p++) chk(n_far[p] > 0, "cross-partition transfers from every partition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge dclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
