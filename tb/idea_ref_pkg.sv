// Reference IDEA model for the testbenches: key expansion, decryption-key
// derivation, one-block encryption, and the four block-chaining modes, all
// written straight from the algorithm's definition (no pipelining).
package idea_ref_pkg;

  typedef logic [15:0] w16_t;
  typedef logic [63:0] blk_t;
  typedef w16_t subkeys_t [52];

  function automatic w16_t ref_mul(w16_t a, w16_t b);
    // multiplication modulo 65537 done with a plain 34-bit modulo
    logic [33:0] aa, bb, p;
    aa = (a == 0) ? 34'd65536 : 34'(a);
    bb = (b == 0) ? 34'd65536 : 34'(b);
    p  = (aa * bb) % 34'd65537;
    return (p == 34'd65536) ? 16'h0 : p[15:0];
  endfunction

  function automatic w16_t ref_inv(w16_t x);
    // brute-force-free inverse: extended Euclid over integers
    longint t, newt, r, newr, q, tmp;
    if (x <= 1) return x;   // 0 (=65536 = -1) and 1 are their own inverses
    t = 0; newt = 1; r = 65537; newr = longint'(x);
    while (newr != 0) begin
      q = r / newr;
      tmp = t - q * newt; t = newt; newt = tmp;
      tmp = r - q * newr; r = newr; newr = tmp;
    end
    if (t < 0) t += 65537;
    return w16_t'(t);
  endfunction

  function automatic subkeys_t expand(logic [127:0] key);
    subkeys_t z;
    logic [127:0] k = key;
    for (int i = 0; i < 52; i++) begin
      if (i > 0 && i % 8 == 0) k = {k[102:0], k[127:103]};
      z[i] = k[127 - 16*(i%8) -: 16];
    end
    return z;
  endfunction

  // z index of round r (1..9), key i (1..6)
  function automatic int zi(int r, int i); return (r-1)*6 + (i-1); endfunction

  function automatic subkeys_t invert(subkeys_t z);
    subkeys_t d;
    for (int r = 1; r <= 9; r++) begin
      int s = 10 - r;
      d[zi(r,1)] = ref_inv(z[zi(s,1)]);
      d[zi(r,4)] = ref_inv(z[zi(s,4)]);
      if (r == 1 || r == 9) begin
        d[zi(r,2)] = -z[zi(s,2)];
        d[zi(r,3)] = -z[zi(s,3)];
      end else begin
        d[zi(r,2)] = -z[zi(s,3)];
        d[zi(r,3)] = -z[zi(s,2)];
      end
      if (r <= 8) begin
        d[zi(r,5)] = z[zi(9-r,5)];
        d[zi(r,6)] = z[zi(9-r,6)];
      end
    end
    return d;
  endfunction

  function automatic blk_t cipher(blk_t x, subkeys_t z);
    w16_t x1, x2, x3, x4, t1, t2;
    {x1, x2, x3, x4} = x;
    for (int r = 1; r <= 8; r++) begin
      x1 = ref_mul(x1, z[zi(r,1)]);
      x2 = x2 + z[zi(r,2)];
      x3 = x3 + z[zi(r,3)];
      x4 = ref_mul(x4, z[zi(r,4)]);
      t1 = ref_mul(x1 ^ x3, z[zi(r,5)]);
      t2 = ref_mul((x2 ^ x4) + t1, z[zi(r,6)]);
      t1 = t1 + t2;
      x1 = x1 ^ t2; x4 = x4 ^ t1;
      t1 = t1 ^ x2; x2 = x3 ^ t2; x3 = t1;
    end
    return {ref_mul(x1, z[zi(9,1)]), x3 + z[zi(9,2)], x2 + z[zi(9,3)], ref_mul(x4, z[zi(9,4)])};
  endfunction

  // Block chaining over nch interleaved chains (block i uses chain i mod nch).
  // mode: 0 ECB, 1 CBC, 2 CFB, 3 OFB. ze are the encryption subkeys.
  function automatic void chain_ref(input int mode, input bit dec, input blk_t din[$], input blk_t iv[],
                                    input int nch, input subkeys_t ze, output blk_t dout[$]);
    blk_t fb[] = new[nch];
    subkeys_t zd = invert(ze);
    blk_t x, y;
    for (int c = 0; c < nch; c++) fb[c] = iv[c];
    dout.delete();
    foreach (din[i]) begin
      int c = i % nch;
      x = din[i];
      case (mode)
        0: y = cipher(x, dec ? zd : ze);
        1: if (!dec) begin y = cipher(x ^ fb[c], ze); fb[c] = y; end
           else      begin y = cipher(x, zd) ^ fb[c]; fb[c] = x; end
        2: begin y = x ^ cipher(fb[c], ze); fb[c] = dec ? x : y; end
        default: begin fb[c] = cipher(fb[c], ze); y = x ^ fb[c]; end
      endcase
      dout.push_back(y);
    end
  endfunction

endpackage
