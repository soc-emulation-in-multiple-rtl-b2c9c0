// ahb_master_model: self-checking AHB traffic generator (testbench only).
//
// Stands in for an IP master of the emulated SoC. It runs NUM_BURSTS bursts
// of 1..4 back-to-back NONSEQ word transfers to a randomly chosen slave (one
// in ten to an unmapped region, which must answer ERROR). Each master uses a
// private 16-word window (address bits [7:6] = ID) in every slave, keeps a
// shadow copy of what it wrote there and checks every read against it. It
// requests the bus with HBUSREQ, starts an address phase on an AHB edge with
// HGRANT[ID] and HREADY high, and lowers HBUSREQ while its last address is
// pending so that the next master's address phase overlaps its data phase.
// Runs on dclk gated by hclk_en, reads the bus copy of its own partition.
module ahb_master_model
  import ahb_pkg::*;
#(
  parameter int ID         = 0,
  parameter int NUM_SLAVES = 3,
  parameter int NUM_BURSTS = 20
) (
  input  logic     dclk,
  input  logic     rst_n,
  input  logic     hclk_en,
  input  ahb_bus_t bus,
  output ahb_m2s_t m,
  output logic     done,
  output int       checks,
  output int       failures,
  output int       n_err,
  output int       n_rd,
  output int       n_wr
);

  int          bursts_left, ops_left;
  logic [3:0]  cur_slave;
  logic        a_valid, a_write, a_err;
  logic [31:0] a_addr, a_wdata, a_exp;
  logic        d_valid, d_write, d_err;
  logic [31:0] d_addr, d_wdata, d_exp;
  logic [31:0] shadow [16][16];

  always_comb begin
    m         = '0;
    m.htrans  = a_valid ? HTRANS_NONSEQ : HTRANS_IDLE;
    m.haddr   = a_addr;
    m.hwrite  = a_write;
    m.hsize   = 3'b010;
    m.hburst  = 3'b001;
    m.hprot   = 4'b0011;
    m.hwdata  = d_wdata;
    m.hbusreq = (ops_left >= 2) || (ops_left == 1 && !a_valid);
    m.hlock   = 1'b0;
    done      = (bursts_left == 0) && (ops_left == 0) && !a_valid && !d_valid;
  end

  always @(posedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      bursts_left <= NUM_BURSTS;
      ops_left <= 0; cur_slave <= '0;
      a_valid <= 0; a_write <= 0; a_err <= 0; a_addr <= '0; a_wdata <= '0; a_exp <= '0;
      d_valid <= 0; d_write <= 0; d_err <= 0; d_addr <= '0; d_wdata <= '0; d_exp <= '0;
      checks <= 0; failures <= 0; n_err <= 0; n_rd <= 0; n_wr <= 0;
      for (int s = 0; s < 16; s++) for (int w = 0; w < 16; w++) shadow[s][w] = '0;
    end else if (hclk_en) begin
      int ol;
      ol = ops_left;
      if (bus.hready) begin
        // end of a data phase
        if (d_valid) begin
          checks <= checks + 1;
          if (d_err) begin
            if (bus.hresp != HRESP_ERROR) begin
              failures <= failures + 1;
              $display("M%0d: no ERROR for unmapped %h", ID, d_addr);
            end else n_err <= n_err + 1;
          end else if (bus.hresp != HRESP_OKAY) begin
            failures <= failures + 1;
            $display("M%0d: unexpected response %0d at %h", ID, bus.hresp, d_addr);
          end else if (!d_write) begin
            n_rd <= n_rd + 1;
            if (bus.hrdata != d_exp) begin
              failures <= failures + 1;
              $display("M%0d: read %h got %h expected %h", ID, d_addr, bus.hrdata, d_exp);
            end
          end else n_wr <= n_wr + 1;
        end
        d_valid <= a_valid; d_write <= a_write; d_err <= a_err;
        d_addr <= a_addr; d_wdata <= a_wdata; d_exp <= a_exp;
        // next address phase
        if (bus.hgrant[ID] && ol > 0) begin
          logic [3:0]  word;
          logic        wr;
          logic [31:0] data;
          word = 4'($urandom_range(0, 15));
          wr   = 1'($urandom_range(0, 1));
          data = $urandom;
          a_valid <= 1'b1;
          a_write <= wr;
          a_err   <= (32'(cur_slave) >= NUM_SLAVES);
          a_addr  <= {cur_slave, 20'h0, 2'(ID), word, 2'b00};
          a_wdata <= data;
          a_exp   <= shadow[cur_slave][word];
          if (wr && 32'(cur_slave) < NUM_SLAVES) shadow[cur_slave][word] = data;
          ol = ol - 1;
        end else a_valid <= 1'b0;
      end
      if (ol == 0 && bursts_left > 0 && !(bus.hready && bus.hgrant[ID] && ops_left > 0)) begin
        int r;
        r = $urandom_range(0, 9);
        cur_slave   <= (r == 9) ? 4'hF : 4'(r % NUM_SLAVES);
        ol          = $urandom_range(1, 4);
        bursts_left <= bursts_left - 1;
      end
      ops_left <= ol;
    end
  end

endmodule
