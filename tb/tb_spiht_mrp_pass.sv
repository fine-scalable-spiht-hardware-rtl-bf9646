// Self-checking test of spiht_mrp_pass for a level-1 band (16 coefficients
// in four sets) and the LL2 case (4 coefficients, one always-significant
// set): random plane, sign and state bits; the expected emitted bits, sign
// bits and new states are built coefficient by coefficient.
module tb_spiht_mrp_pass;
  logic [15:0] plane, sign, csig, bits, sbits, csnx, nsig;
  logic [3:0] gsig;
  logic [4:0] cnt, scnt;
  logic [3:0] p2, s2, c2, b2, sb2, cn2, ns2;
  logic [2:0] cnt2, scnt2;
  int checks = 0, failures = 0;

  spiht_mrp_pass #(.N(16), .NGRP(4)) u1 (.plane, .sign, .coef_sig(csig), .grp_sig(gsig), .bits, .cnt, .sbits, .scnt, .coef_sig_nx(csnx), .new_sig(nsig));
  spiht_mrp_pass #(.N(4), .NGRP(1)) u2 (.plane(p2), .sign(s2), .coef_sig(c2), .grp_sig(1'b1), .bits(b2), .cnt(cnt2), .sbits(sb2), .scnt(scnt2), .coef_sig_nx(cn2), .new_sig(ns2));

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
      bit eb[$], es[$];
      logic [15:0] ec;
      eb.delete(); es.delete();
      plane = 16'($urandom); sign = 16'($urandom); gsig = 4'($urandom);
      csig = 16'($urandom);
      for (int g = 0; g < 4; g++) if (!gsig[g]) csig[4*g +: 4] = 4'h0;
      p2 = 4'($urandom); s2 = 4'($urandom); c2 = 4'($urandom);
      #1;
      ec = csig;
      for (int k = 0; k < 16; k++)
        if (gsig[k/4]) begin
          eb.push_back(plane[k]);
          if (!csig[k] && plane[k]) begin es.push_back(sign[k]); ec[k] = 1'b1; end
        end
      checks++;
      if (cnt != 5'(eb.size()) || scnt != 5'(es.size()) || csnx != ec || nsig != (ec & ~csig)) failures++;
      for (int k = 0; k < eb.size(); k++) begin checks++; if (bits[k] != eb[k]) failures++; end
      for (int k = 0; k < es.size(); k++) begin checks++; if (sbits[k] != es[k]) failures++; end
      // LL2: every coefficient emits its bit
      checks++;
      if (cnt2 != 3'd4 || b2 != p2 || cn2 != (c2 | p2)) failures++;
      begin
        int j;
        j = 0;
        for (int k = 0; k < 4; k++)
          if (!c2[k] && p2[k]) begin checks++; if (sb2[j] != s2[k]) failures++; j++; end
        checks++;
        if (scnt2 != 3'(j)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
