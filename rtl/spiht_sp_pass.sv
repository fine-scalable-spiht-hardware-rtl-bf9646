// Sorting pass (SP) of one wavelet band for one magnitude bit-plane.
//
// A set is significant in plane n when one of its coefficients has a
// magnitude of at least 2^n.  Still-insignificant sets have no bit above n
// set, so the test is the OR of the plane-n bits of the set.  The pass emits
// one bit per tested set, in order:
//   * the band set, if the band is not yet significant;
//   * for a level-1 band (N = 16) that is significant now, one bit for each
//     of its four 2x2 groups that is not yet significant.
// A level-2 band (N = 4) is a single set.  This gives at most 1 bit for a
// level-2 band and 5 for a level-1 band, the counts the FMC design quotes for
// HL2 SP and HL1 SP; how those bits map onto sets is this design's reading.
// Purely combinational; bit 0 of bits is emitted first.
module spiht_sp_pass #(
  parameter int N = 16   // coefficients in the band: 16 (level 1) or 4 (level 2)
) (
  input  logic [N-1:0]      plane,       // plane bits in coding order
  input  logic              band_sig,
  input  logic [N/4-1:0]    grp_sig,     // used only when N = 16
  output logic [4:0]        bits,
  output logic [2:0]        cnt,
  output logic              band_sig_nx,
  output logic [N/4-1:0]    grp_sig_nx
);
  localparam int NGRP = N / 4;

  always_comb begin
    logic [2:0] c;
    logic       t;
    t    = 1'b0;
    bits = '0;
    c    = '0;
    band_sig_nx = band_sig;
    grp_sig_nx  = grp_sig;
    if (!band_sig) begin
      t = |plane;
      bits[c] = t;
      c = c + 3'd1;
      band_sig_nx = t;
    end
    if (NGRP > 1 && band_sig_nx) begin
      for (int g = 0; g < NGRP; g++) begin
        if (!grp_sig[g]) begin
          t = |plane[4*g +: 4];
          bits[c] = t;
          c = c + 3'd1;
          grp_sig_nx[g] = t;
        end
      end
    end
    if (NGRP == 1) grp_sig_nx = {NGRP{band_sig_nx}};
    cnt = c;
  end
endmodule
