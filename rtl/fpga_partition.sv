// fpga_partition: one FPGA's share of a split AHB bus.
//
// Holds the micro-cycle sequencer and the bus splitter, and in the central
// partition (IS_CENTRAL = 1) also the arbiter, the address decoder and the
// default slave; a partition without them takes HGRANTx, HMASTER and HSELx
// from the link. The masters and slaves mapped to this FPGA are outside the
// module: their outputs come in on m_out/s_out (entries of masters and
// slaves that belong to other partitions are ignored), and they read the
// local bus copy on bus. They run on DCLK gated by hclk_en, which is high in
// one DCLK cycle out of DIV. The link is a pad triple: ext_out value,
// ext_oe drive enable per line, ext_in the resolved lines.
module fpga_partition
  import ahb_pkg::*;
#(
  parameter bit                     IS_CENTRAL    = 1'b1,
  parameter int                     NUM_MASTERS   = 3,
  parameter int                     NUM_SLAVES    = 3,
  parameter logic [MAX_MASTERS-1:0] LOCAL_MASTERS = 8'h01,
  parameter logic [MAX_SLAVES-1:0]  LOCAL_SLAVES  = 16'h0003,
  parameter int                     DIV           = 5
) (
  input  logic                       dclk,
  input  logic                       rst_n,
  output logic                       hclk_en,
  input  ahb_m2s_t [MAX_MASTERS-1:0] m_out,
  input  ahb_s2m_t [MAX_SLAVES-1:0]  s_out,
  output ahb_bus_t                   bus,
  input  logic [W-1:0]               ext_in,
  output logic [W-1:0]               ext_out,
  output logic [W-1:0]               ext_oe
);

  logic [3:0]                  e;
  logic [$clog2(DIV)-1:0]      phase;
  logic [MAX_MASTERS-1:0]      arb_hgrant;
  logic [MW-1:0]               arb_hmaster;
  logic                        arb_hmastlock;
  logic [MAX_SLAVES-1:0]       dec_hsel;
  ahb_s2m_t                    def_out;

  bs_sequencer #(.DIV(DIV)) u_seq (
    .dclk, .rst_n, .e, .hclk_en, .phase
  );

  if (IS_CENTRAL) begin : g_central
    logic [NUM_MASTERS-1:0] grant_n;

    ahb_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arb (
      .dclk, .rst_n, .hclk_en,
      .hbusreq (bus.hbusreq[NUM_MASTERS-1:0]),
      .hlock   (bus.hlock[NUM_MASTERS-1:0]),
      .hready  (bus.hready),
      .hgrant  (grant_n),
      .hmaster (arb_hmaster),
      .hmastlock(arb_hmastlock)
    );
    assign arb_hgrant = MAX_MASTERS'(grant_n);

    ahb_decoder #(.NUM_SLAVES(NUM_SLAVES)) u_dec (
      .haddr (bus.haddr),
      .hsel  (dec_hsel)
    );

    ahb_default_slave u_def (
      .dclk, .rst_n, .hclk_en,
      .hsel   (dec_hsel == '0),
      .htrans (bus.htrans),
      .hready (bus.hready),
      .resp   (def_out)
    );
  end else begin : g_remote
    assign arb_hgrant    = '0;
    assign arb_hmaster   = '0;
    assign arb_hmastlock = 1'b0;
    assign dec_hsel      = '0;
    assign def_out       = '0;
  end

  bus_splitter #(
    .IS_CENTRAL(IS_CENTRAL), .NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(NUM_SLAVES),
    .LOCAL_MASTERS(LOCAL_MASTERS), .LOCAL_SLAVES(LOCAL_SLAVES)
  ) u_bs (
    .dclk, .rst_n, .e, .hclk_en, .m_out, .s_out, .def_out,
    .arb_hgrant, .arb_hmaster, .arb_hmastlock, .dec_hsel,
    .ext_in, .ext_out, .ext_oe, .bus
  );

endmodule
