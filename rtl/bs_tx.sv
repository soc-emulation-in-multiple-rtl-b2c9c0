// bs_tx: transmit stage (second stage) of the bus splitter.
//
// Each AHB period carries four 32-bit words, one per micro-cycle. While
// strobe e[k] is high, this stage puts word[k] on the link and enables the
// line drivers of exactly the bits own[k] that this partition owns in that
// micro-cycle; all other lines are left to the other partitions. Selecting
// the word of the active micro-cycle by gating each word with its strobe and
// merging the four results is this implementation's choice of logic; the scheme only
// asks that a line be driven at its micro-cycle alone. ext_out/ext_oe stand
// for the value and enable of a bidirectional pad. Purely combinational.
module bs_tx #(
  parameter int W = 32
) (
  input  logic [3:0]         e,
  input  logic [3:0][W-1:0]  word,
  input  logic [3:0][W-1:0]  own,
  output logic [W-1:0]       ext_out,
  output logic [W-1:0]       ext_oe
);

  always_comb begin
    ext_out = '0;
    ext_oe  = '0;
    for (int k = 0; k < 4; k++) begin
      ext_out |= word[k] & own[k] & {W{e[k]}};
      ext_oe  |= own[k] & {W{e[k]}};
    end
  end

endmodule
