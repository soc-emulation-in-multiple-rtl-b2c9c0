// soc_emu_top: one AHB bus split over two FPGAs by a pair of bus splitters.
//
// Partition 0 (central) holds the arbiter, the decoder and the default slave
// and the masters/slaves selected by P0_MASTERS/P0_SLAVES; partition 1 holds
// the rest. Each partition keeps a full copy of the bus (bus0, bus1). The two
// are joined by W = 32 shared lines that carry four words per AHB period,
// one per micro-cycle, each line driven by exactly one partition at a time.
// The defaults are the three-master, three-slave example of the published
// scheme (M1, S1, S2 with the arbiter; M2, M3, S3 in the other FPGA) and a
// link clock five times the bus clock (33 MHz against 6.6 MHz).
//
// The IP blocks themselves are outside: every master's outputs enter on
// m_out[i] and every slave's on s_out[j]; partition 0 uses only the entries
// it owns, partition 1 the others. A master or slave reads the bus copy of
// its own partition and advances only on DCLK edges with hclk_en high.
// The bidirectional pads and the cable are modelled as a wired OR of the
// enabled outputs (a line driven by nobody reads 0); link_conflict flags a
// line driven by both sides, which the ownership rules exclude.
module soc_emu_top
  import ahb_pkg::*;
#(
  parameter int                     NUM_MASTERS = 3,
  parameter int                     NUM_SLAVES  = 3,
  parameter logic [MAX_MASTERS-1:0] P0_MASTERS  = 8'h01,
  parameter logic [MAX_SLAVES-1:0]  P0_SLAVES   = 16'h0003,
  parameter int                     DIV         = 5
) (
  input  logic                       dclk,
  input  logic                       rst_n,
  output logic                       hclk_en,
  input  ahb_m2s_t [MAX_MASTERS-1:0] m_out,
  input  ahb_s2m_t [MAX_SLAVES-1:0]  s_out,
  output ahb_bus_t                   bus0,
  output ahb_bus_t                   bus1,
  output logic [W-1:0]               link,
  output logic [W-1:0]               link_conflict
);

  localparam logic [MAX_MASTERS-1:0] M_USED = MAX_MASTERS'((64'd1 << NUM_MASTERS) - 1);
  localparam logic [MAX_SLAVES-1:0]  S_USED = MAX_SLAVES'((64'd1 << NUM_SLAVES) - 1);

  logic [W-1:0] out0, oe0, out1, oe1;
  logic         hclk_en1;

  fpga_partition #(
    .IS_CENTRAL(1'b1), .NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(NUM_SLAVES),
    .LOCAL_MASTERS(P0_MASTERS & M_USED), .LOCAL_SLAVES(P0_SLAVES & S_USED), .DIV(DIV)
  ) u_fpga0 (
    .dclk, .rst_n, .hclk_en, .m_out, .s_out, .bus(bus0),
    .ext_in(link), .ext_out(out0), .ext_oe(oe0)
  );

  fpga_partition #(
    .IS_CENTRAL(1'b0), .NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(NUM_SLAVES),
    .LOCAL_MASTERS(~P0_MASTERS & M_USED), .LOCAL_SLAVES(~P0_SLAVES & S_USED), .DIV(DIV)
  ) u_fpga1 (
    .dclk, .rst_n, .hclk_en(hclk_en1), .m_out, .s_out, .bus(bus1),
    .ext_in(link), .ext_out(out1), .ext_oe(oe1)
  );

  always_comb begin
    link          = (out0 & oe0) | (out1 & oe1);
    link_conflict = oe0 & oe1;
  end

  // One driver per line in every micro-cycle, none in the spare cycle.
  assert property (@(posedge dclk) disable iff (!rst_n) link_conflict == '0);
  assert property (@(posedge dclk) disable iff (!rst_n) !hclk_en || (oe0 | oe1) == '0);
  assert property (@(posedge dclk) disable iff (!rst_n) hclk_en || (oe0 | oe1) == '1);
  assert property (@(posedge dclk) disable iff (!rst_n) hclk_en == hclk_en1);

endmodule
