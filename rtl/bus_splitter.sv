// bus_splitter: replicates one AHB bus over a 32-line link (BS1/BS2).
//
// Two stages, as in the design: the first (bs_select) picks the signals of
// the currently active master and slave and forms this partition's copy of
// the bus; the second (bs_tx) drives, in each of the four micro-cycles e1..e4
// of an AHB period, only the link bits this partition owns. A receive stage
// (bs_rx) latches the link word of every micro-cycle so that the fields
// driven by the other partition appear on the local bus copy.
//
// Words per micro-cycle (layout in ahb_pkg): 1 arbitration and requests,
// 2 HADDR, 3 remaining master control, HSELx and the slave response,
// 4 HWDATA or HRDATA. A field is therefore valid on the far side one DCLK
// cycle after its micro-cycle and stays valid up to and including the AHB
// edge (hclk_en) of that period. The AHB signals crossing the link must come
// from registers, except HSELx, which is decoded from HADDR after micro-cycle
// 2; this holds for AHB slaves whose HREADYOUT is registered.
module bus_splitter
  import ahb_pkg::*;
#(
  parameter bit                     IS_CENTRAL    = 1'b1,
  parameter int                     NUM_MASTERS   = 3,
  parameter int                     NUM_SLAVES    = 3,
  parameter logic [MAX_MASTERS-1:0] LOCAL_MASTERS = 8'h01,
  parameter logic [MAX_SLAVES-1:0]  LOCAL_SLAVES  = 16'h0003
) (
  input  logic                       dclk,
  input  logic                       rst_n,
  input  logic [3:0]                 e,
  input  logic                       hclk_en,
  input  ahb_m2s_t [MAX_MASTERS-1:0] m_out,
  input  ahb_s2m_t [MAX_SLAVES-1:0]  s_out,
  input  ahb_s2m_t                   def_out,
  input  logic [MAX_MASTERS-1:0]     arb_hgrant,
  input  logic [MW-1:0]              arb_hmaster,
  input  logic                       arb_hmastlock,
  input  logic [MAX_SLAVES-1:0]      dec_hsel,
  input  logic [W-1:0]               ext_in,
  output logic [W-1:0]               ext_out,
  output logic [W-1:0]               ext_oe,
  output ahb_bus_t                   bus
);

  logic [3:0][W-1:0] rx, own, word;
  logic [MW-1:0]          hmaster_d;
  logic [MAX_SLAVES-1:0]  hsel_d;
  logic                   hwrite_d;

  bs_rx #(.W(W)) u_rx (
    .dclk, .rst_n, .e, .ext_in, .rx
  );

  bs_select #(
    .IS_CENTRAL(IS_CENTRAL), .NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(NUM_SLAVES),
    .LOCAL_MASTERS(LOCAL_MASTERS), .LOCAL_SLAVES(LOCAL_SLAVES)
  ) u_sel (
    .dclk, .rst_n, .hclk_en, .m_out, .s_out, .def_out,
    .arb_hgrant, .arb_hmaster, .arb_hmastlock, .dec_hsel,
    .rx, .bus, .own, .hmaster_d, .hsel_d, .hwrite_d
  );

  always_comb begin
    word[0] = pack_u1(bus);
    word[1] = bus.haddr;
    word[2] = pack_u3(bus);
    word[3] = hwrite_d ? bus.hwdata : bus.hrdata;
  end

  bs_tx #(.W(W)) u_tx (
    .e, .word, .own, .ext_out, .ext_oe
  );

endmodule
