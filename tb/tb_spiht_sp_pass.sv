// Self-checking test of spiht_sp_pass for a level-1 band (16 coefficients,
// four groups) and a level-2 band (4 coefficients, one set): random plane
// bits and set states, expected bits and states worked out set by set.
module tb_spiht_sp_pass;
  logic [15:0] plane1; logic bsig1; logic [3:0] gsig1;
  logic [4:0] bits1; logic [2:0] cnt1; logic bnx1; logic [3:0] gnx1;
  logic [3:0] plane2; logic bsig2; logic gsig2;
  logic [4:0] bits2; logic [2:0] cnt2; logic bnx2; logic gnx2;
  int checks = 0, failures = 0;

  spiht_sp_pass #(.N(16)) u1 (.plane(plane1), .band_sig(bsig1), .grp_sig(gsig1), .bits(bits1), .cnt(cnt1), .band_sig_nx(bnx1), .grp_sig_nx(gnx1));
  spiht_sp_pass #(.N(4))  u2 (.plane(plane2), .band_sig(bsig2), .grp_sig(gsig2), .bits(bits2), .cnt(cnt2), .band_sig_nx(bnx2), .grp_sig_nx(gnx2));

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      bit e_bits[$];
      bit eb;
      logic [3:0] eg;
      plane1 = 16'($urandom);
      if (t % 3 == 0) plane1 = 16'(1 << $urandom_range(0, 15));
      if (t % 5 == 0) plane1 = 0;
      bsig1 = 1'($urandom); gsig1 = bsig1 ? 4'($urandom) : 4'h0;
      plane2 = 4'($urandom); bsig2 = 1'($urandom); gsig2 = bsig2;
      #1;
      // level 1 expectation
      e_bits.delete();
      eb = bsig1; eg = gsig1;
      if (!bsig1) begin eb = (plane1 != 0); e_bits.push_back(eb); end
      if (eb)
        for (int g = 0; g < 4; g++)
          if (!gsig1[g]) begin eg[g] = (plane1[4*g +: 4] != 0); e_bits.push_back(eg[g]); end
      checks++;
      if (cnt1 != 3'(e_bits.size()) || bnx1 != eb || gnx1 != eg) failures++;
      for (int k = 0; k < e_bits.size(); k++) begin
        checks++;
        if (bits1[k] != e_bits[k]) failures++;
      end
      // level 2 expectation
      checks++;
      if (bsig2) begin
        if (cnt2 != 0 || bnx2 != 1'b1) failures++;
      end else begin
        if (cnt2 != 1 || bits2[0] != (plane2 != 0) || bnx2 != (plane2 != 0) || gnx2 != (plane2 != 0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
