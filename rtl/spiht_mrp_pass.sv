// Merged refinement pass (MRP) of one wavelet band for one magnitude plane.
//
// The classic fixed-order SPIHT has two per-coefficient passes, the first
// refinement pass (significance of a coefficient inside a significant set)
// and the refinement pass (next bit of an already significant coefficient).
// Both test one coefficient against the same plane and a coefficient is only
// ever in one of them, so they are merged: every coefficient whose set is
// significant emits its plane-n bit, and the coefficient's state decides what
// that bit means.  A coefficient that was insignificant and emits a 1 becomes
// significant and queues its sign bit in a separate sign segment (sbits).
// Merging the passes follows the FMC design; the separate sign segment is
// this design's choice.  Purely combinational; bit 0 is emitted first.
module spiht_mrp_pass #(
  parameter int N    = 16,   // coefficients in the band
  parameter int NGRP = 4     // sets the band is split into (N/NGRP each)
) (
  input  logic [N-1:0]          plane,      // plane bits, coding order
  input  logic [N-1:0]          sign,       // 1 = negative
  input  logic [N-1:0]          coef_sig,
  input  logic [NGRP-1:0]       grp_sig,    // set states after the SP
  output logic [N-1:0]          bits,
  output logic [$clog2(N+1)-1:0] cnt,
  output logic [N-1:0]          sbits,
  output logic [$clog2(N+1)-1:0] scnt,
  output logic [N-1:0]          coef_sig_nx,
  output logic [N-1:0]          new_sig
);
  localparam int CW = $clog2(N + 1);
  localparam int GS = N / NGRP;

  always_comb begin
    logic [CW-1:0] c, s;
    bits = '0;
    sbits = '0;
    c = '0;
    s = '0;
    coef_sig_nx = coef_sig;
    new_sig = '0;
    for (int k = 0; k < N; k++) begin
      if (grp_sig[k / GS]) begin
        bits[c[$clog2(N)-1:0]] = plane[k];
        c = c + CW'(1);
        if (!coef_sig[k] && plane[k]) begin
          coef_sig_nx[k] = 1'b1;
          new_sig[k] = 1'b1;
          sbits[s[$clog2(N)-1:0]] = sign[k];
          s = s + CW'(1);
        end
      end
    end
    cnt = c;
    scnt = s;
  end
endmodule
