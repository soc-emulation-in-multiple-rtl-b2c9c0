// tb_fpga_partition: a central partition that holds every master and
// slave, and a listening partition that holds none.
//
// The central partition must behave as a complete AHB bus (arbiter,
// decoder, default slave): three master models run random bursts against
// three slave models with wait states and to an unmapped region, and check
// every response. The listening partition only receives; on every AHB edge
// its bus copy must equal the central one, and it must never drive the
// link, while the central partition drives all 32 lines in every
// micro-cycle.
module tb_fpga_partition;
  import ahb_pkg::*;
  logic dclk = 0, rst_n = 0;
  always #5 dclk = ~dclk;

  logic hclk_en, hclk_en_b;
  ahb_m2s_t [MAX_MASTERS-1:0] m_out;
  ahb_s2m_t [MAX_SLAVES-1:0]  s_out;
  ahb_bus_t bus_a, bus_b;
  logic [31:0] out_a, oe_a, out_b, oe_b, link;
  assign link = (out_a & oe_a) | (out_b & oe_b);

  fpga_partition #(.IS_CENTRAL(1'b1), .LOCAL_MASTERS(8'h07), .LOCAL_SLAVES(16'h0007)) u_a (
    .dclk, .rst_n, .hclk_en, .m_out, .s_out, .bus(bus_a),
    .ext_in(link), .ext_out(out_a), .ext_oe(oe_a));
  fpga_partition #(.IS_CENTRAL(1'b0), .LOCAL_MASTERS(8'h00), .LOCAL_SLAVES(16'h0000)) u_b (
    .dclk, .rst_n, .hclk_en(hclk_en_b), .m_out('0), .s_out('0), .bus(bus_b),
    .ext_in(link), .ext_out(out_b), .ext_oe(oe_b));

  logic [2:0] mdone;
  int mchk[3], mfail[3], merr[3], mrd[3], mwr[3];
  for (genvar i = 0; i < 3; i++) begin : g_m
    ahb_master_model #(.ID(i), .NUM_BURSTS(15)) u_m (
      .dclk, .rst_n, .hclk_en, .bus(bus_a), .m(m_out[i]), .done(mdone[i]),
      .checks(mchk[i]), .failures(mfail[i]), .n_err(merr[i]), .n_rd(mrd[i]), .n_wr(mwr[i]));
  end
  for (genvar i = 3; i < MAX_MASTERS; i++) begin : g_mz
    assign m_out[i] = '0;
  end
  for (genvar j = 0; j < 3; j++) begin : g_s
    ahb_slave_model #(.ID(j)) u_s (.dclk, .rst_n, .hclk_en, .bus(bus_a), .s(s_out[j]));
  end
  for (genvar j = 3; j < MAX_SLAVES; j++) begin : g_sz
    assign s_out[j] = '0;
  end

  int checks = 0, failures = 0, phase_cnt = 0;
  bit d_write;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge dclk) if (rst_n) begin
    chk(oe_b == 0, "listener never drives");
    chk(hclk_en == hclk_en_b, "sequencers in step");
    chk(oe_a == (hclk_en ? 32'h0 : 32'hFFFF_FFFF), "central drives every line");
    if (hclk_en) begin
      chk(bus_a.hmaster == bus_b.hmaster && bus_a.hgrant == bus_b.hgrant &&
          bus_a.hbusreq == bus_b.hbusreq && bus_a.haddr == bus_b.haddr &&
          bus_a.htrans == bus_b.htrans && bus_a.hwrite == bus_b.hwrite &&
          bus_a.hsel == bus_b.hsel && bus_a.hready == bus_b.hready &&
          bus_a.hresp == bus_b.hresp, "listener copy");
      if (d_write) chk(bus_a.hwdata == bus_b.hwdata, "listener HWDATA");
      else         chk(bus_a.hrdata == bus_b.hrdata, "listener HRDATA");
      if (bus_a.hready) d_write <= bus_a.hwrite;
    end
  end

  initial begin
    d_write = 0;
    repeat (3) @(posedge dclk);
    rst_n = 1;
    wait (&mdone);
    repeat (10) @(posedge dclk);
    for (int i = 0; i < 3; i++) begin
      checks += mchk[i] + 1;
      failures += mfail[i];
      if (merr[i] + mrd[i] + mwr[i] == 0) failures++;
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
