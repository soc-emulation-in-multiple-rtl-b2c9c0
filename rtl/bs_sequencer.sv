// bs_sequencer: micro-cycle sequencer of the bus splitter.
//
// The link runs on DCLK; the AHB bus runs DIV times slower (33 MHz link
// against a 6.6 MHz bus gives the default DIV = 5). A counter steps through
// the DIV link cycles of one AHB period. In link cycles 0..3 it raises one of
// the micro-cycle strobes e[0..3] (e1..e4 in the published scheme); the last link cycle
// of the period raises hclk_en, the clock enable at which every AHB register
// takes its next value. DIV must be at least 5 so that the word of
// micro-cycle 4 is latched on the far side one link cycle before the AHB edge
// that uses it: the spare cycle is this design's choice, the published scheme
// only gives the two clock rates.
//
// Every partition has its own sequencer; all of them leave reset on the same
// DCLK edge and so stay in step. Outputs are registered-free decodes of the
// counter and are valid from the first cycle after reset.
module bs_sequencer #(
  parameter int DIV = 5
) (
  input  logic       dclk,
  input  logic       rst_n,
  output logic [3:0] e,        // e[k] = micro-cycle k+1
  output logic       hclk_en,  // last link cycle of the AHB period
  output logic [$clog2(DIV)-1:0] phase
);

  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n)                   phase <= '0;
    else if (32'(phase) == DIV - 1)    phase <= '0;
    else                          phase <= phase + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < 4; k++) e[k] = (32'(phase) == k);
    hclk_en = (32'(phase) == DIV - 1);
  end

  initial assert (DIV >= 5) else $error("bs_sequencer: DIV must be at least 5");

endmodule
