// ahb_decoder: AHB address decoder of the central partition.
//
// The bus-splitter scheme places the decoder with the arbiter and does not
// detail it. Its
// HADDR -> HSELx path is the one combinational path that crosses the
// partition boundary; the link packing sends HADDR in micro-cycle 2 and the
// decoded HSELx in micro-cycle 3 for that reason. The address map here is
// this design's own: slave j owns the region whose address bits
// [31:REGION_LSB] equal j. Addresses above the last slave select nothing and
// are answered by the default slave. Purely combinational.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int NUM_SLAVES = 3,
  parameter int REGION_LSB = 28
) (
  input  logic [W-1:0]          haddr,
  output logic [MAX_SLAVES-1:0] hsel
);

  logic [W-REGION_LSB-1:0] region;

  always_comb begin
    region = haddr[W-1:REGION_LSB];
    hsel   = '0;
    for (int j = 0; j < NUM_SLAVES; j++)
      if (32'(region) == j) hsel[j] = 1'b1;
  end

endmodule
