// Reference models used by the testbenches: the 5/3 wavelet transform of an
// 8x8 block and the bit-plane coder (encode and decode of one block), written
// as plain sequential code on integers, independent of the RTL structure.
//
// Bitstream of one block, first bit first, for each magnitude plane n = 8..0:
//   LL2 MRP, then for HL2, LH2, HH2, HL1, LH1, HH1: SP bits followed by MRP
//   bits, then the sign bits of the coefficients that became significant in
//   this plane, band by band (LL2 first).  Everything is cut at the target
//   bit length; missing bits read as zero.
package fmc_ref_pkg;

  typedef int iblk_t [64];

  function automatic int fdiv(int a, int s);   // floor(a / 2^s)
    return a >>> s;
  endfunction

  // 1D forward 5/3 on n samples of v starting at v[0] (stride handled by caller)
  function automatic void fwd1(ref int v[8], input int n);
    int d[4], s[4], h = n / 2;
    for (int i = 0; i < h; i++)
      d[i] = v[2*i+1] - fdiv(v[2*i] + ((2*i+2 < n) ? v[2*i+2] : v[n-2]), 1);
    for (int i = 0; i < h; i++)
      s[i] = v[2*i] + fdiv(((i == 0) ? d[0] : d[i-1]) + d[i] + 2, 2);
    for (int i = 0; i < h; i++) begin v[i] = s[i]; v[h+i] = d[i]; end
  endfunction

  function automatic void inv1(ref int v[8], input int n);
    int d[4], s[4], e[4], h = n / 2;
    for (int i = 0; i < h; i++) begin s[i] = v[i]; d[i] = v[h+i]; end
    for (int i = 0; i < h; i++)
      e[i] = s[i] - fdiv(((i == 0) ? d[0] : d[i-1]) + d[i] + 2, 2);
    for (int i = 0; i < h; i++) begin
      v[2*i]   = e[i];
      v[2*i+1] = d[i] + fdiv(e[i] + ((i + 1 < h) ? e[i+1] : e[i]), 1);
    end
  endfunction

  function automatic void dwt(input int pix[64], output int c[64]);
    int v[8];
    c = pix;
    for (int lev = 0; lev < 2; lev++) begin
      int n;
      n = (lev == 0) ? 8 : 4;
      for (int r = 0; r < n; r++) begin
        for (int k = 0; k < n; k++) v[k] = c[r*8+k];
        fwd1(v, n);
        for (int k = 0; k < n; k++) c[r*8+k] = v[k];
      end
      for (int k = 0; k < n; k++) begin
        for (int r = 0; r < n; r++) v[r] = c[r*8+k];
        fwd1(v, n);
        for (int r = 0; r < n; r++) c[r*8+k] = v[r];
      end
    end
  endfunction

  function automatic void idwt(input int c[64], output int pix[64]);
    int v[8];
    pix = c;
    for (int lev = 1; lev >= 0; lev--) begin
      int n;
      n = (lev == 0) ? 8 : 4;
      for (int k = 0; k < n; k++) begin
        for (int r = 0; r < n; r++) v[r] = pix[r*8+k];
        inv1(v, n);
        for (int r = 0; r < n; r++) pix[r*8+k] = v[r];
      end
      for (int r = 0; r < n; r++) begin
        for (int k = 0; k < n; k++) v[k] = pix[r*8+k];
        inv1(v, n);
        for (int k = 0; k < n; k++) pix[r*8+k] = v[k];
      end
    end
  endfunction

  // Index of the k-th coefficient of band b in coding order.
  function automatic int cidx(int b, int k);
    int r0[7] = '{0, 0, 2, 2, 0, 4, 4};
    int c0[7] = '{0, 2, 0, 2, 4, 0, 4};
    if (b < 4) return (r0[b] + k / 2) * 8 + c0[b] + k % 2;
    return (r0[b] + 2 * ((k / 4) / 2) + (k % 4) / 2) * 8 + c0[b] + 2 * ((k / 4) % 2) + (k % 4) % 2;
  endfunction

  function automatic int sat_mag(int v);
    int m = (v < 0) ? -v : v;
    return (m > 511) ? 511 : m;
  endfunction

  // Encoder: returns the bitstream (zero beyond tbl) and the untruncated length.
  function automatic void encode(input int c[64], input int tbl, output bit bs[384], output int len);
    bit sig[64], bsig[7], gsig[7][4];
    int mag[64];
    bit neg[64];
    bit st[1024];
    int p = 0;
    for (int i = 0; i < 64; i++) begin mag[i] = sat_mag(c[i]); neg[i] = c[i] < 0; sig[i] = 0; end
    for (int b = 0; b < 7; b++) begin bsig[b] = (b == 0); for (int g = 0; g < 4; g++) gsig[b][g] = 0; end
    for (int n = 8; n >= 0; n--) begin
      bit newsig[64];
      for (int i = 0; i < 64; i++) newsig[i] = 0;
      for (int b = 0; b < 7; b++) begin
          int sz;
        sz = (b >= 4) ? 16 : 4;
        // SP
        if (b > 0) begin
          if (!bsig[b]) begin
            bit t;
            t = 0;
            for (int k = 0; k < sz; k++) t |= mag[cidx(b,k)][n];
            st[p++] = t; bsig[b] = t;
          end
          if (b >= 4 && bsig[b])
            for (int g = 0; g < 4; g++)
              if (!gsig[b][g]) begin
                bit t;
                t = 0;
                for (int k = 4*g; k < 4*g+4; k++) t |= mag[cidx(b,k)][n];
                st[p++] = t; gsig[b][g] = t;
              end
        end
        // MRP
        for (int k = 0; k < sz; k++) begin
          bit inset;
          int i;
          i = cidx(b, k);
          inset = (b >= 4) ? gsig[b][k/4] : bsig[b];
          if (inset) begin
            st[p++] = mag[i][n];
            if (!sig[i] && mag[i][n]) begin sig[i] = 1; newsig[i] = 1; end
          end
        end
      end
      for (int b = 0; b < 7; b++)
        for (int k = 0; k < ((b >= 4) ? 16 : 4); k++)
          if (newsig[cidx(b,k)]) st[p++] = neg[cidx(b,k)];
    end
    len = p;
    for (int i = 0; i < 384; i++) bs[i] = (i < tbl && i < p) ? st[i] : 1'b0;
  endfunction

  // Decoder: coefficients from a (possibly truncated) bitstream.
  function automatic void decode(input bit bs[384], input int tbl, output int c[64]);
    bit sig[64], bsig[7], gsig[7][4];
    int mag[64];
    bit neg[64];
    int p = 0;
    for (int i = 0; i < 64; i++) begin mag[i] = 0; neg[i] = 0; sig[i] = 0; end
    for (int b = 0; b < 7; b++) begin bsig[b] = (b == 0); for (int g = 0; g < 4; g++) gsig[b][g] = 0; end
    for (int n = 8; n >= 0; n--) begin
      bit newsig[64];
      for (int i = 0; i < 64; i++) newsig[i] = 0;
      for (int b = 0; b < 7; b++) begin
        int sz;
        sz = (b >= 4) ? 16 : 4;
        if (b > 0) begin
          if (!bsig[b]) begin bsig[b] = (p < tbl) ? bs[p] : 0; p++; end
          if (b >= 4 && bsig[b])
            for (int g = 0; g < 4; g++)
              if (!gsig[b][g]) begin gsig[b][g] = (p < tbl) ? bs[p] : 0; p++; end
        end
        for (int k = 0; k < sz; k++) begin
          bit inset;
          int i;
          i = cidx(b, k);
          inset = (b >= 4) ? gsig[b][k/4] : bsig[b];
          if (inset) begin
            bit t;
            t = (p < tbl) ? bs[p] : 0;
            p++;
            if (t) mag[i] |= (1 << n);
            if (!sig[i] && t) begin sig[i] = 1; newsig[i] = 1; end
          end
        end
      end
      for (int b = 0; b < 7; b++)
        for (int k = 0; k < ((b >= 4) ? 16 : 4); k++)
          if (newsig[cidx(b,k)]) begin neg[cidx(b,k)] = (p < tbl) ? bs[p] : 0; p++; end
    end
    for (int i = 0; i < 64; i++) c[i] = neg[i] ? -mag[i] : mag[i];
  endfunction

  function automatic int clamp8(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

endpackage
