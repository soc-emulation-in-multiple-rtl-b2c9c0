// bs_rx: receive stage of the bus splitter.
//
// One W-bit register per micro-cycle. Register k loads the link lines on
// the DCLK edge that ends micro-cycle k (strobe e[k] high) and holds them
// for the rest of the AHB period, so that the remote fields of the bus
// replica are stable from the link cycle after their micro-cycle until the
// same micro-cycle of the next period. Registers clear on reset. Four
// strobed registers on the receive side follow the published drawing of
// the bus splitter.
module bs_rx #(
  parameter int W = 32
) (
  input  logic               dclk,
  input  logic               rst_n,
  input  logic [3:0]         e,
  input  logic [W-1:0]       ext_in,
  output logic [3:0][W-1:0]  rx
);

  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n) rx <= '0;
    else
      for (int k = 0; k < 4; k++)
        if (e[k]) rx[k] <= ext_in;
  end

endmodule
