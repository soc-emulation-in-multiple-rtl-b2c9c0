// bs_select: first stage of the bus splitter, and the bus replica.
//
// Every partition keeps a full copy of the AHB bus. Each bus signal has one
// source at a time: the current address-phase master (HMASTER), the current
// data-phase master (HMASTER_d), the current data-phase slave (HSELx_d), the
// arbiter or the decoder. If that source sits in this partition, the signal
// is taken from the local unit through the address, write-data and
// read-data multiplexers (named AC, DW and DR in the published scheme);
// otherwise it is taken from the word received over the link in its
// micro-cycle. The same
// knowledge gives, for every link bit and micro-cycle, whether this partition
// must drive it (output own), so that exactly one partition drives each line.
//
// HMASTER_d, HSELx_d and HWRITE_d are the address-phase values registered at
// an AHB edge with HREADY high, as in any AHB bus; they steer the
// data-phase multiplexers and the direction of micro-cycle 4. A transfer to
// no slave is answered by the default slave, which sits with the decoder in
// the central partition (IS_CENTRAL = 1).
//
// Ownership per micro-cycle (bit layout in ahb_pkg):
//   1: HMASTER/HMASTLOCK/HGRANTx -> central; HBUSREQx/HLOCKx bit i -> owner
//      of master i (bits of unused master numbers -> central, driven 0)
//   2: HADDR -> owner of HMASTER
//   3: master control -> owner of HMASTER; HSELx -> central;
//      HREADY/HRESP -> owner of the data-phase slave
//   4: all bits -> owner of HMASTER_d for a write, of the data-phase slave
//      for a read
// Combinational except the three data-phase registers (DCLK, enabled by
// hclk_en, asynchronous active-low reset).
module bs_select
  import ahb_pkg::*;
#(
  parameter bit                     IS_CENTRAL    = 1'b1,
  parameter int                     NUM_MASTERS   = 3,
  parameter int                     NUM_SLAVES    = 3,
  parameter logic [MAX_MASTERS-1:0] LOCAL_MASTERS = 8'h01,
  parameter logic [MAX_SLAVES-1:0]  LOCAL_SLAVES  = 16'h0003
) (
  input  logic                            dclk,
  input  logic                            rst_n,
  input  logic                            hclk_en,
  input  ahb_m2s_t [MAX_MASTERS-1:0]      m_out,     // local masters
  input  ahb_s2m_t [MAX_SLAVES-1:0]       s_out,     // local slaves
  input  ahb_s2m_t                        def_out,   // default slave (central)
  input  logic [MAX_MASTERS-1:0]          arb_hgrant,
  input  logic [MW-1:0]                   arb_hmaster,
  input  logic                            arb_hmastlock,
  input  logic [MAX_SLAVES-1:0]           dec_hsel,
  input  logic [3:0][W-1:0]               rx,        // received words
  output ahb_bus_t                        bus,
  output logic [3:0][W-1:0]               own,
  output logic [MW-1:0]                   hmaster_d,
  output logic [MAX_SLAVES-1:0]           hsel_d,
  output logic                            hwrite_d
);

  localparam int MIW = $clog2(MAX_MASTERS);

  localparam logic [MAX_MASTERS-1:0] M_USED = MAX_MASTERS'((64'd1 << NUM_MASTERS) - 1);
  localparam logic [MAX_SLAVES-1:0]  S_USED = MAX_SLAVES'((64'd1 << NUM_SLAVES) - 1);
  // Masters this partition answers for: its own, plus unused numbers if central.
  localparam logic [MAX_MASTERS-1:0] M_LOC  = (LOCAL_MASTERS & M_USED) |
                                              (IS_CENTRAL ? ~M_USED : '0);

  function automatic logic mloc(logic [MW-1:0] idx);
    if (32'(idx) >= NUM_MASTERS) return IS_CENTRAL;
    return M_LOC[idx[MIW-1:0]];
  endfunction

  logic           am_loc, dm_loc, ds_loc;
  ahb_m2s_t       am, dm;      // local address-phase and data-phase master
  ahb_s2m_t       ds;          // local data-phase slave
  logic [MAX_SLAVES-1:0] hsel_used_d;

  always_comb begin
    hsel_used_d = hsel_d & S_USED;
    // ---- arbiter outputs ----
    bus.hmaster   = IS_CENTRAL ? arb_hmaster   : rx[0][U1_HMASTER_LSB +: MW];
    bus.hmastlock = IS_CENTRAL ? arb_hmastlock : rx[0][U1_HMASTLOCK];
    bus.hgrant    = IS_CENTRAL ? arb_hgrant    : rx[0][U1_HGRANT_LSB +: MAX_MASTERS];
    // ---- requests from every master ----
    for (int i = 0; i < MAX_MASTERS; i++) begin
      bus.hbusreq[i] = M_LOC[i] ? (M_USED[i] & m_out[i].hbusreq) : rx[0][U1_HBUSREQ_LSB + i];
      bus.hlock[i]   = M_LOC[i] ? (M_USED[i] & m_out[i].hlock)   : rx[0][U1_HLOCK_LSB + i];
    end
    // ---- address phase: AC multiplexer ----
    am_loc = mloc(bus.hmaster);
    am     = (32'(bus.hmaster) < NUM_MASTERS) ? m_out[bus.hmaster[MIW-1:0]] : '0;
    bus.haddr  = am_loc ? am.haddr  : rx[1];
    bus.hwrite = am_loc ? am.hwrite : rx[2][U3_HWRITE];
    bus.hsize  = am_loc ? am.hsize  : rx[2][U3_HSIZE_LSB +: 3];
    bus.hprot  = am_loc ? am.hprot  : rx[2][U3_HPROT_LSB +: 4];
    bus.htrans = am_loc ? am.htrans : rx[2][U3_HTRANS_LSB +: 2];
    bus.hburst = am_loc ? am.hburst : rx[2][U3_HBURST_LSB +: 3];
    // ---- decoder ----
    bus.hsel   = IS_CENTRAL ? dec_hsel : rx[2][U3_HSEL_LSB +: MAX_SLAVES];
    // ---- data phase slave: DR multiplexer ----
    ds_loc = (|(hsel_used_d & LOCAL_SLAVES)) || (IS_CENTRAL && !(|hsel_used_d));
    ds     = IS_CENTRAL ? def_out : '0;
    for (int j = 0; j < MAX_SLAVES; j++)
      if (hsel_used_d[j] && LOCAL_SLAVES[j]) ds = s_out[j];
    bus.hready = ds_loc ? ds.hreadyout : rx[2][U3_HREADY];
    bus.hresp  = ds_loc ? ds.hresp     : rx[2][U3_HRESP_LSB +: 2];
    bus.hrdata = ds_loc ? ds.hrdata    : rx[3];
    // ---- data phase master: DW multiplexer ----
    dm_loc = mloc(hmaster_d);
    dm     = (32'(hmaster_d) < NUM_MASTERS) ? m_out[hmaster_d[MIW-1:0]] : '0;
    bus.hwdata = dm_loc ? dm.hwdata : rx[3];

    // ---- which link bits this partition drives ----
    own[0] = IS_CENTRAL ? U1_ARB_BITS : '0;
    for (int i = 0; i < MAX_MASTERS; i++) begin
      own[0][U1_HBUSREQ_LSB + i] = M_LOC[i];
      own[0][U1_HLOCK_LSB + i]   = M_LOC[i];
    end
    own[1] = {W{am_loc}};
    own[2] = ({W{am_loc}} & U3_MASTER_BITS) |
             (IS_CENTRAL ? U3_DEC_BITS : '0) |
             ({W{ds_loc}} & U3_SLAVE_BITS);
    own[3] = {W{hwrite_d ? dm_loc : ds_loc}};
  end

  // ---- data-phase registers (HMASTER_d, HSELx_d) ----
  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      hmaster_d <= '0;
      hsel_d    <= '0;
      hwrite_d  <= 1'b0;
    end else if (hclk_en && bus.hready) begin
      hmaster_d <= bus.hmaster;
      hsel_d    <= bus.hsel;
      hwrite_d  <= bus.hwrite;
    end
  end

endmodule
