// ahb_pkg: types and constants shared by the AHB bus splitter.
//
// The bus splitter replicates one AMBA AHB bus across several FPGAs over a
// 32-line link. One AHB clock period is cut into four link micro-cycles, and
// each micro-cycle carries one 32-bit word (the packing follows the field
// order of the published packing of AHB into four 32-bit words):
//
//   micro-cycle 1 : HMASTER, HMASTLOCK, HGRANTx, HLOCKx, HBUSREQx
//   micro-cycle 2 : HADDR
//   micro-cycle 3 : HWRITE, HSIZE, HPROT, HSELx, HREADY, HRESP, HTRANS, HBURST
//   micro-cycle 4 : HWDATA (write) or HRDATA (read)
//
// The field names, their order and the word per micro-cycle follow the
// published scheme; the exact bit bounds of each field are this package's
// own choice (HMASTER in the top nibble of word 1 and HADDR filling word 2 are as
// drawn). The maxima MAX_MASTERS = 8 and MAX_SLAVES = 16 follow from that
// layout. The package also holds the pin-count formula for a bus cut with
// and without the splitter.
package ahb_pkg;

  localparam int W           = 32;  // link lines and AHB data/address width
  localparam int NUM_MICRO   = 4;   // micro-cycles per AHB clock
  localparam int MAX_MASTERS = 8;
  localparam int MAX_SLAVES  = 16;
  localparam int MW          = 4;   // HMASTER width

  // HTRANS encodings
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;
  // HRESP encodings
  localparam logic [1:0] HRESP_OKAY  = 2'b00;
  localparam logic [1:0] HRESP_ERROR = 2'b01;
  localparam logic [1:0] HRESP_RETRY = 2'b10;
  localparam logic [1:0] HRESP_SPLIT = 2'b11;

  // Outputs of one AHB master.
  typedef struct packed {
    logic          hbusreq;
    logic          hlock;
    logic [1:0]    htrans;
    logic [W-1:0]  haddr;
    logic          hwrite;
    logic [2:0]    hsize;
    logic [2:0]    hburst;
    logic [3:0]    hprot;
    logic [W-1:0]  hwdata;
  } ahb_m2s_t;

  // Outputs of one AHB slave.
  typedef struct packed {
    logic          hreadyout;
    logic [1:0]    hresp;
    logic [W-1:0]  hrdata;
  } ahb_s2m_t;

  // The shared bus as every partition sees it.
  typedef struct packed {
    logic [MW-1:0]          hmaster;
    logic                   hmastlock;
    logic [MAX_MASTERS-1:0] hgrant;
    logic [MAX_MASTERS-1:0] hlock;
    logic [MAX_MASTERS-1:0] hbusreq;
    logic [W-1:0]           haddr;
    logic                   hwrite;
    logic [2:0]             hsize;
    logic [3:0]             hprot;
    logic [MAX_SLAVES-1:0]  hsel;
    logic                   hready;
    logic [1:0]             hresp;
    logic [1:0]             htrans;
    logic [2:0]             hburst;
    logic [W-1:0]           hwdata;
    logic [W-1:0]           hrdata;
  } ahb_bus_t;

  // ---- Link word layout ----------------------------------------------------
  // micro-cycle 1
  localparam int U1_HMASTER_LSB = 28;  // [31:28]
  localparam int U1_HMASTLOCK   = 27;  // [27]   ([26:24] unused, driven 0)
  localparam int U1_HGRANT_LSB  = 16;  // [23:16]
  localparam int U1_HLOCK_LSB   = 8;   // [15:8]
  localparam int U1_HBUSREQ_LSB = 0;   // [7:0]
  // micro-cycle 3
  localparam int U3_HWRITE      = 31;  // [31]
  localparam int U3_HSIZE_LSB   = 28;  // [30:28]
  localparam int U3_HPROT_LSB   = 24;  // [27:24]
  localparam int U3_HSEL_LSB    = 8;   // [23:8]
  localparam int U3_HREADY      = 7;   // [7]
  localparam int U3_HRESP_LSB   = 5;   // [6:5]
  localparam int U3_HTRANS_LSB  = 3;   // [4:3]
  localparam int U3_HBURST_LSB  = 0;   // [2:0]

  // Bit groups of each word by the kind of unit that drives them.
  localparam logic [W-1:0] U1_ARB_BITS   = 32'hFFFF_0000;  // arbiter side
  localparam logic [W-1:0] U3_MASTER_BITS = 32'hFF00_001F; // current master
  localparam logic [W-1:0] U3_DEC_BITS    = 32'h00FF_FF00; // decoder side
  localparam logic [W-1:0] U3_SLAVE_BITS  = 32'h0000_00E0; // data-phase slave

  function automatic logic [W-1:0] pack_u1(ahb_bus_t b);
    logic [W-1:0] w;
    w = '0;
    w[U1_HMASTER_LSB +: MW]          = b.hmaster;
    w[U1_HMASTLOCK]                  = b.hmastlock;
    w[U1_HGRANT_LSB +: MAX_MASTERS]  = b.hgrant;
    w[U1_HLOCK_LSB +: MAX_MASTERS]   = b.hlock;
    w[U1_HBUSREQ_LSB +: MAX_MASTERS] = b.hbusreq;
    return w;
  endfunction

  function automatic logic [W-1:0] pack_u3(ahb_bus_t b);
    logic [W-1:0] w;
    w = '0;
    w[U3_HWRITE]                  = b.hwrite;
    w[U3_HSIZE_LSB +: 3]          = b.hsize;
    w[U3_HPROT_LSB +: 4]          = b.hprot;
    w[U3_HSEL_LSB +: MAX_SLAVES]  = b.hsel;
    w[U3_HREADY]                  = b.hready;
    w[U3_HRESP_LSB +: 2]          = b.hresp;
    w[U3_HTRANS_LSB +: 2]         = b.htrans;
    w[U3_HBURST_LSB +: 3]         = b.hburst;
    return w;
  endfunction

  // ---- Pin count of a bus cut in two --------------------------------------
  // a: global control signals, b/c: unsharable/sharable control signals from
  // a master, d/e: the same from a slave, w: bus width, m/s: masters/slaves
  // in the system, m0/s0: those in the partition with arbiter and decoder.
  localparam int AHB_A = 6;
  localparam int AHB_B = 2;
  localparam int AHB_C = 13;
  localparam int AHB_D = 1;
  localparam int AHB_E = 3;

  function automatic int pins_direct(int a, int b, int c, int d, int e,
                                     int w, int m, int m0, int s, int s0);
    return a + (b + c + 2*w) * (m - m0 + 1) + (d + e + w) * (s - s0 + 1);
  endfunction

  function automatic int pins_bussplit(int a, int b, int c, int d, int e,
                                       int w, int m, int m0, int s, int s0);
    return a + b * (m - m0 + 1) + d * (s - s0 + 1) + c + e + 2*w;
  endfunction

endpackage
