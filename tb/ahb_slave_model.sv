// ahb_slave_model: AHB memory slave with random wait states (testbench only).
//
// Stands in for an IP slave of the emulated SoC: 64 words addressed by
// HADDR[7:2], zero after reset. A transfer is accepted on an AHB edge with
// HSEL[ID], HTRANS NONSEQ/SEQ and HREADY high; its data phase then lasts
// 0..MAX_WAIT extra AHB cycles (HREADYOUT low). HREADYOUT, HRESP and HRDATA
// depend only on registers, as the link requires of anything that crosses
// it. Write data is stored on the edge that ends the data phase.
module ahb_slave_model
  import ahb_pkg::*;
#(
  parameter int ID       = 0,
  parameter int MAX_WAIT = 2
) (
  input  logic     dclk,
  input  logic     rst_n,
  input  logic     hclk_en,
  input  ahb_bus_t bus,
  output ahb_s2m_t s
);

  logic [31:0] mem [64];
  logic        dp_active, dp_write;
  logic [5:0]  dp_idx;
  int          wait_cnt;

  always_comb begin
    s.hreadyout = (wait_cnt == 0);
    s.hresp     = HRESP_OKAY;
    s.hrdata    = (dp_active && !dp_write) ? mem[dp_idx] : '0;
  end

  always @(posedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      dp_active <= 0; dp_write <= 0; dp_idx <= '0; wait_cnt <= 0;
      for (int i = 0; i < 64; i++) mem[i] <= '0;
    end else if (hclk_en) begin
      if (dp_active && wait_cnt != 0) wait_cnt <= wait_cnt - 1;
      else begin
        if (dp_active && dp_write) mem[dp_idx] <= bus.hwdata;
        if (bus.hready && bus.hsel[ID] && bus.htrans[1]) begin
          dp_active <= 1'b1;
          dp_write  <= bus.hwrite;
          dp_idx    <= bus.haddr[7:2];
          wait_cnt  <= $urandom_range(0, MAX_WAIT);
        end else if (bus.hready) dp_active <= 1'b0;
      end
    end
  end

endmodule
