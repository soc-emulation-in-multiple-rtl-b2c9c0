// ahb_arbiter: AHB bus arbiter of the central partition.
//
// The published bus-splitter scheme places one arbiter with the decoder in
// one partition and does not detail it; this is a plain fixed-priority arbiter (master 0 highest). On
// every AHB edge (hclk_en) the grant moves to the highest-priority requesting
// master, unless the master that owns the address phase holds a locked
// request, in which case it keeps the bus. With no request the grant falls
// to master 0, the default master. HMASTER and HMASTLOCK follow the grant on
// an AHB edge with HREADY high, as AHB requires. All outputs are registers
// (DCLK, enabled by hclk_en, asynchronous active-low reset), so none of them
// depends combinationally on the other partition.
module ahb_arbiter
  import ahb_pkg::*;
#(
  parameter int NUM_MASTERS = 3
) (
  input  logic                   dclk,
  input  logic                   rst_n,
  input  logic                   hclk_en,
  input  logic [NUM_MASTERS-1:0] hbusreq,
  input  logic [NUM_MASTERS-1:0] hlock,
  input  logic                   hready,
  output logic [NUM_MASTERS-1:0] hgrant,
  output logic [MW-1:0]          hmaster,
  output logic                   hmastlock
);

  logic [NUM_MASTERS-1:0] next_grant;
  logic [MW-1:0]          grant_idx;
  logic                   keep;

  always_comb begin
    keep = 1'b0;
    for (int i = 0; i < NUM_MASTERS; i++)
      if (32'(hmaster) == i) keep = hbusreq[i] && hlock[i] && hgrant[i];
    next_grant = '0;
    if (keep) next_grant = hgrant;
    else begin
      for (int i = NUM_MASTERS - 1; i >= 0; i--)
        if (hbusreq[i]) next_grant = NUM_MASTERS'(1) << i;
      if (next_grant == '0) next_grant = NUM_MASTERS'(1);
    end
    grant_idx = '0;
    for (int i = 0; i < NUM_MASTERS; i++)
      if (hgrant[i]) grant_idx = MW'(i);
  end

  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      hgrant    <= NUM_MASTERS'(1);
      hmaster   <= '0;
      hmastlock <= 1'b0;
    end else if (hclk_en) begin
      hgrant <= next_grant;
      if (hready) begin
        hmaster   <= grant_idx;
        hmastlock <= |(hlock & hgrant);
      end
    end
  end

  assert property (@(posedge dclk) disable iff (!rst_n) $onehot(hgrant));

endmodule
