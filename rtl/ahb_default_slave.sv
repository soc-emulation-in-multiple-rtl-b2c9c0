// ahb_default_slave: answers transfers that select no slave.
//
// Not part of the published bus-splitter scheme; it is what an AHB decoder
// needs so that the bus is never left without a data-phase slave. It sits in
// the central partition. IDLE and BUSY transfers get a zero-wait OKAY; a
// NONSEQ or SEQ transfer gets the two-cycle ERROR response of AHB (first
// cycle HREADY low, second HREADY high, HRESP = ERROR in both). Its outputs
// are registers updated on AHB edges (hclk_en); hsel is high when the decoder
// selects no slave.
module ahb_default_slave
  import ahb_pkg::*;
(
  input  logic       dclk,
  input  logic       rst_n,
  input  logic       hclk_en,
  input  logic       hsel,
  input  logic [1:0] htrans,
  input  logic       hready,
  output ahb_s2m_t   resp
);

  typedef enum logic [1:0] {DS_OKAY, DS_ERR1, DS_ERR2} ds_state_t;
  ds_state_t state;

  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n) state <= DS_OKAY;
    else if (hclk_en) begin
      unique case (state)
        DS_ERR1: state <= DS_ERR2;
        default: state <= (hready && hsel && htrans[1]) ? DS_ERR1 : DS_OKAY;
      endcase
    end
  end

  always_comb begin
    resp.hrdata    = '0;
    resp.hreadyout = (state != DS_ERR1);
    resp.hresp     = (state == DS_OKAY) ? HRESP_OKAY : HRESP_ERROR;
  end

endmodule
