// sacha_ref_pkg: reference models for the testbenches.
//
// An AES-128 encryption written independently of the RTL: the S-box is not
// taken from a listing but computed as the multiplicative inverse in
// GF(2^8) (a^254) followed by the affine map (once, then kept in a table),
// and the state is a byte array. On top of it, a streaming AES-CMAC
// (RFC 4493) that takes bytes one at a time.
package sacha_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0, x = a, y = b;
    for (int i = 0; i < 8; i++) begin
      if (y[0]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
      y = y >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] inv = 8'h01, r;
    // a^254 = a^-1 (and 0 -> 0)
    for (int i = 0; i < 254; i++) inv = gmul(inv, a);
    if (a == 0) inv = 0;
    r = inv;
    for (int i = 1; i <= 4; i++) r ^= 8'((inv << i) | (inv >> (8 - i)));
    return r ^ 8'h63;
  endfunction

  // The inversion is slow, so the 256 results are computed once and kept.
  logic [7:0] sbox_tab [256];
  bit         sbox_ready = 0;

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    if (!sbox_ready) begin
      for (int i = 0; i < 256; i++) sbox_tab[i] = sbox_calc(8'(i));
      sbox_ready = 1;
    end
    return sbox_tab[a];
  endfunction

  function automatic logic [127:0] ref_aes(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] s [16], t [16], k [16], w [176];
    logic [7:0] rc = 8'h01, tmp [4];
    for (int i = 0; i < 16; i++) w[i] = key[127-8*i -: 8];
    for (int i = 4; i < 44; i++) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[4*(i-1)+j];
      if (i % 4 == 0) begin
        logic [7:0] t0 = tmp[0];
        tmp[0] = ref_sbox(tmp[1]) ^ rc; tmp[1] = ref_sbox(tmp[2]);
        tmp[2] = ref_sbox(tmp[3]);      tmp[3] = ref_sbox(t0);
        rc = gmul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[4*i+j] = w[4*(i-4)+j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = ref_sbox(s[i]);
      for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++)
        s[4*c+row] = t[4*((c+row)%4)+row];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          for (int j = 0; j < 4; j++) t[j] = s[4*c+j];
          s[4*c+0] = gmul(t[0],2) ^ gmul(t[1],3) ^ t[2] ^ t[3];
          s[4*c+1] = t[0] ^ gmul(t[1],2) ^ gmul(t[2],3) ^ t[3];
          s[4*c+2] = t[0] ^ t[1] ^ gmul(t[2],2) ^ gmul(t[3],3);
          s[4*c+3] = gmul(t[0],3) ^ t[1] ^ t[2] ^ gmul(t[3],2);
        end
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r+i];
    end
    for (int i = 0; i < 16; i++) ref_aes[127-8*i -: 8] = s[i];
  endfunction

  // Streaming CMAC: add bytes, then finish.
  class cmac_ref;
    logic [127:0] key, k1, k2, x, blk;
    int unsigned  n;          // bytes in blk
    bit           pending;    // blk holds a full block not yet chained

    function new(logic [127:0] k);
      logic [127:0] l;
      key = k;
      l  = ref_aes(k, '0);
      k1 = {l[126:0], 1'b0} ^ (l[127] ? 128'h87 : 128'h0);
      k2 = {k1[126:0], 1'b0} ^ (k1[127] ? 128'h87 : 128'h0);
      restart();
    endfunction

    function void restart();
      x = '0; blk = '0; n = 0; pending = 0;
    endfunction

    function void add_byte(logic [7:0] b);
      if (pending) begin
        x = ref_aes(key, x ^ blk);
        pending = 0; blk = '0; n = 0;
      end
      blk[127-8*n -: 8] = b;
      n++;
      if (n == 16) pending = 1;
    endfunction

    function void add_word(logic [31:0] w);
      for (int i = 0; i < 4; i++) add_byte(w[31-8*i -: 8]);
    endfunction

    function logic [127:0] finish();
      logic [127:0] t;
      if (pending) t = ref_aes(key, x ^ blk ^ k1);
      else begin
        blk[127-8*n -: 8] = 8'h80;
        t = ref_aes(key, x ^ blk ^ k2);
      end
      restart();
      return t;
    endfunction
  endclass

endpackage
