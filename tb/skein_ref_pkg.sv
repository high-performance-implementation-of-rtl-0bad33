// skein_ref_pkg: untimed reference model of Threefish and Skein used by the
// testbenches to work out expected values. It follows the textbook form of
// the algorithm (subkeys indexed by s, rounds looped one by one, the
// configuration UBI computed rather than taken as a constant) so that it
// shares no structure with the ring-register and unrolled hardware.
package skein_ref_pkg;

  typedef logic [63:0]        w64_t;
  typedef logic [7:0][63:0]   blk_t;   // up to 8 words, word 0 in bits 63:0

  localparam w64_t KS_PARITY = 64'h1BD11BDAA9FC1A22;

  // Rotation tables, row d (0..7), column j.
  localparam int R256 [8][2] = '{'{14,16},'{52,57},'{23,40},'{5,37},
                                 '{25,33},'{46,12},'{58,22},'{32,32}};
  localparam int R512 [8][4] = '{'{46,36,19,37},'{33,27,14,42},'{17,49,36,39},'{44,9,54,56},
                                 '{39,30,34,24},'{13,50,10,17},'{25,29,39,43},'{8,35,56,22}};
  localparam int P256 [4] = '{0,3,2,1};
  localparam int P512 [8] = '{2,1,4,7,6,5,0,3};

  function automatic w64_t rl(w64_t x, int r);
    return r == 0 ? x : ((x << r) | (x >> (64 - r)));
  endfunction

  function automatic int rot(int nw, int d, int j);
    return nw == 4 ? R256[d % 8][j] : R512[d % 8][j];
  endfunction

  function automatic int prm(int nw, int i);
    return nw == 4 ? P256[i] : P512[i];
  endfunction

  // Subkey s, word i, straight from the formulas.
  function automatic w64_t subkey(int nw, blk_t key, logic [127:0] tw, int s, int i);
    w64_t kx [9];
    w64_t tx [3];
    w64_t r;
    kx[nw] = KS_PARITY;
    for (int j = 0; j < nw; j++) begin
      kx[j]  = key[j];
      kx[nw] = kx[nw] ^ key[j];
    end
    tx[0] = tw[63:0];
    tx[1] = tw[127:64];
    tx[2] = tx[0] ^ tx[1];
    r = kx[(s + i) % (nw + 1)];
    if (i == nw - 3) r = r + tx[s % 3];
    if (i == nw - 2) r = r + tx[(s + 1) % 3];
    if (i == nw - 1) r = r + w64_t'(s);
    return r;
  endfunction

  // One round, d = round number.
  function automatic blk_t one_round(int nw, blk_t v, int d);
    blk_t f, o;
    f = '0;
    o = '0;
    for (int j = 0; j < nw / 2; j++) begin
      f[2*j]   = v[2*j] + v[2*j+1];
      f[2*j+1] = rl(v[2*j+1], rot(nw, d, j)) ^ f[2*j];
    end
    for (int i = 0; i < nw; i++) o[i] = f[prm(nw, i)];
    return o;
  endfunction

  function automatic blk_t encrypt(int nw, blk_t key, logic [127:0] tw, blk_t pt);
    blk_t v;
    v = pt;
    for (int d = 0; d < 72; d++) begin
      if (d % 4 == 0)
        for (int i = 0; i < nw; i++) v[i] = v[i] + subkey(nw, key, tw, d / 4, i);
      v = one_round(nw, v, d);
    end
    for (int i = 0; i < nw; i++) v[i] = v[i] + subkey(nw, key, tw, 18, i);
    for (int i = nw; i < 8; i++) v[i] = '0;
    return v;
  endfunction

  function automatic logic [127:0] tweak(logic [95:0] pos, int typ, bit first, bit fin);
    logic [127:0] t;
    t = '0;
    t[95:0] = pos;
    t[125:120] = 6'(typ);
    t[126] = first;
    t[127] = fin;
    return t;
  endfunction

  // UBI over a byte string (empty string = one zero block).
  function automatic blk_t ubi(int nw, blk_t g, logic [7:0] msg [$], int typ);
    int nb = nw * 8;
    int nblk = (msg.size() == 0) ? 1 : (msg.size() + nb - 1) / nb;
    blk_t h = g;
    for (int b = 0; b < nblk; b++) begin
      blk_t m = '0;
      int used = 0;
      for (int k = 0; k < nb; k++) begin
        int idx = b * nb + k;
        if (idx < msg.size()) begin
          m[k / 8][8 * (k % 8) +: 8] = msg[idx];
          used++;
        end
      end
      begin
        blk_t c;
        c = encrypt(nw, h, tweak(96'(b * nb + used), typ, b == 0, b == nblk - 1), m);
        for (int i = 0; i < nw; i++) h[i] = c[i] ^ m[i];
      end
    end
    return h;
  endfunction

  // Chaining value after the configuration UBI, output length = state size.
  function automatic blk_t config_iv(int nw);
    logic [7:0] cfg [$];
    w64_t w0 = 64'h0000_0001_3341_4853;   // "SHA3", version 1
    w64_t w1 = w64_t'(nw * 64);           // output length in bits
    for (int k = 0; k < 8; k++) cfg.push_back(w0[8*k +: 8]);
    for (int k = 0; k < 8; k++) cfg.push_back(w1[8*k +: 8]);
    for (int k = 0; k < 16; k++) cfg.push_back(8'h00);
    return ubi(nw, '0, cfg, 4);
  endfunction

  function automatic blk_t hash(int nw, logic [7:0] msg [$]);
    blk_t g;
    logic [7:0] ctr [$];
    g = ubi(nw, config_iv(nw), msg, 48);
    for (int k = 0; k < 8; k++) ctr.push_back(8'h00);
    return ubi(nw, g, ctr, 63);
  endfunction

endpackage
