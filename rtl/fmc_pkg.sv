// Shared types, sizes and index maps of the frame-memory-compression (FMC) codec.
//
// An 8x8 block of 8-bit pixels is wavelet transformed (two levels, reversible
// 5/3 lifting) into 64 coefficients in Mallat layout, index r*8+c:
//   LL2 (0,0)  HL2 (0,2)  LH2 (2,0)  HH2 (2,2)   each 2x2
//   HL1 (0,4)  LH1 (4,0)  HH1 (4,4)              each 4x4
// The coefficients are coded as one sign plane and nine magnitude planes
// (bit 8 down to bit 0).  Inside a band, coefficients are visited in a fixed
// "coding order": a level-1 band is four 2x2 groups (the children of the four
// coefficients of the matching level-2 band), group-major, raster inside a
// group; a level-2 band is raster order.  The target bit length of one block
// follows from the target compression ratio: 384, 320 or 256 bits for 25%,
// 37.5% and 50% (6, 5 or 4 bus words of 64 bits).
package fmc_pkg;

  localparam int BLK       = 8;    // block is BLK x BLK pixels
  localparam int NCOEF     = 64;
  localparam int PIX_W     = 8;
  localparam int COEF_W    = 13;   // signed DWT coefficient width
  localparam int MAG_W     = 9;    // magnitude planes 8..0
  localparam int NPLANES   = 10;   // sign plane + 9 magnitude planes
  localparam int UPPER_PLANES = 6; // sign, 8..4: sent straight to a core
  localparam int LOWER_PLANES = 4; // 3..0: kept in the bit-plane buffer
  localparam int PIPE      = 8;    // cycles per pipe time (8 pixels/cycle)
  localparam int BUS_W     = 64;
  localparam int TBL_MAX   = 384;  // largest target bit length per block
  localparam int POS_W     = 9;    // bit position in a block bitstream
  localparam int NBANDS    = 7;
  localparam int SP_W      = 5;    // max SP bits of one band and plane
  localparam int SEG_W     = 16;   // max MRP or sign bits of one band and plane
  localparam int PW        = 146;  // max bits of one plane: 18 SP + 64 MRP + 64 sign
  localparam int BL_IN     = 16;   // burst length on the codec side

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t                    blk_t [NCOEF];
  typedef coef_t                    vec8_t [8];

  typedef enum logic [2:0] {LL2 = 3'd0, HL2 = 3'd1, LH2 = 3'd2, HH2 = 3'd3,
                            HL1 = 3'd4, LH1 = 3'd5, HH1 = 3'd6} band_e;

  typedef enum logic [1:0] {CR25 = 2'd0, CR375 = 2'd1, CR50 = 2'd2, CR50B = 2'd3} cr_e;

  function automatic int band_size(int b);
    return (b < 4) ? 4 : 16;
  endfunction

  // Coefficient index (r*8+c) of the k-th coefficient of band b in coding order.
  function automatic int coef_idx(int b, int k);
    int r0, c0, r, c, g, j;
    case (b)
      0: begin r0 = 0; c0 = 0; end
      1: begin r0 = 0; c0 = 2; end
      2: begin r0 = 2; c0 = 0; end
      3: begin r0 = 2; c0 = 2; end
      4: begin r0 = 0; c0 = 4; end
      5: begin r0 = 4; c0 = 0; end
      default: begin r0 = 4; c0 = 4; end
    endcase
    if (b < 4) begin
      r = r0 + k / 2;
      c = c0 + k % 2;
    end else begin
      g = k / 4;
      j = k % 4;
      r = r0 + 2 * (g / 2) + j / 2;
      c = c0 + 2 * (g % 2) + j % 2;
    end
    return r * BLK + c;
  endfunction

  // Target bit length of one block for a compression-ratio mode.
  function automatic logic [POS_W-1:0] tbl_bits(logic [1:0] cr);
    case (cr)
      2'd0:    return POS_W'(384);
      2'd1:    return POS_W'(320);
      default: return POS_W'(256);
    endcase
  endfunction

  // 64-bit words per block: 6, 5 or 4.
  function automatic logic [2:0] tbl_words(logic [1:0] cr);
    case (cr)
      2'd0:    return 3'd6;
      2'd1:    return 3'd5;
      default: return 3'd4;
    endcase
  endfunction

  // Forward 5/3 lifting on the first n (8 or 4) entries of x, symmetric
  // extension, returning the result; lows go to 0..n/2-1, highs to n/2..n-1.
  function automatic vec8_t lift53_fwd(vec8_t xi, int n);
    vec8_t x;
    coef_t d[4];
    coef_t s[4];
    coef_t xr;
    x = xi;
    for (int i = 0; i < 4; i++) begin
      if (i < n / 2) begin
        xr = (2 * i + 2 < n) ? x[2*i+2] : x[n-2];
        d[i] = x[2*i+1] - ((x[2*i] + xr) >>> 1);
      end else begin
        d[i] = '0;
      end
    end
    for (int i = 0; i < 4; i++) begin
      if (i < n / 2)
        s[i] = x[2*i] + (((i > 0 ? d[i-1] : d[0]) + d[i] + coef_t'(2)) >>> 2);
      else
        s[i] = '0;
    end
    for (int i = 0; i < 4; i++) begin
      if (i < n / 2) begin
        x[i]       = s[i];
        x[n/2 + i] = d[i];
      end
    end
    return x;
  endfunction

  // Inverse of lift53_fwd.
  function automatic vec8_t lift53_inv(vec8_t xi, int n);
    vec8_t x;
    coef_t d[4];
    coef_t s[4];
    coef_t e[5];
    x = xi;
    for (int i = 0; i < 4; i++) begin
      s[i] = (i < n / 2) ? x[i] : '0;
      d[i] = (i < n / 2) ? x[n/2 + i] : '0;
    end
    for (int i = 0; i < 4; i++)
      e[i] = s[i] - (((i > 0 ? d[i-1] : d[0]) + d[i] + coef_t'(2)) >>> 2);
    e[4] = '0;
    for (int i = 0; i < 4; i++) begin
      if (i < n / 2) begin
        x[2*i]   = e[i];
        x[2*i+1] = d[i] + ((e[i] + ((i + 1 < n / 2) ? e[i+1] : e[i])) >>> 1);
      end
    end
    return x;
  endfunction

endpackage
