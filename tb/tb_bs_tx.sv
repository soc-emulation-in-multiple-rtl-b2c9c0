// tb_bs_tx: random words, ownership masks and strobes; the link value and
// drive enables must equal the word and mask of the one active micro-cycle,
// bit by bit, and nothing may be driven when no strobe is active.
module tb_bs_tx;
  logic [3:0]        e;
  logic [3:0][31:0]  word, own;
  logic [31:0]       ext_out, ext_oe;
  int checks = 0, failures = 0;

  bs_tx dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int k;
      for (int i = 0; i < 4; i++) begin word[i] = $urandom; own[i] = $urandom; end
      k = $urandom_range(0, 4);      // 4: spare cycle, no strobe
      e = (k < 4) ? 4'(1 << k) : 4'b0;
      #1;
      for (int b = 0; b < 32; b++) begin
        bit exp_oe, exp_v;
        exp_oe = (k < 4) && own[k][b];
        exp_v  = exp_oe && word[k][b];
        checks++;
        if (ext_oe[b] !== exp_oe || ext_out[b] !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d bit %0d", k, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
