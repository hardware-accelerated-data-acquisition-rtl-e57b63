// tb_sha3_ref: reference model of Keccak-f[1600] and of the keyed MAC
// SHA3-256(key || message), written as plain functions on a 5x5 lane
// array for the testbenches. Byte 0 of the digest is bit [7:0].
package tb_sha3_ref;

  typedef logic [63:0] lanes_t [5][5];   // [x][y]

  function automatic logic [63:0] rol(logic [63:0] v, int n);
    n = n % 64;
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  // Round constants generated by the LFSR x^8+x^6+x^5+x^4+1 of the Keccak
  // specification rather than taken from a table.
  function automatic logic [63:0] round_const(int ir);
    logic [7:0] r;
    logic [63:0] rc;
    r  = 8'h01;
    rc = '0;
    for (int t = 0; t < 7 * ir; t++) begin
      r = r[7] ? ((r << 1) ^ 8'h71) : (r << 1);
    end
    for (int j = 0; j < 7; j++) begin
      if (r[0]) rc[(1 << j) - 1] = 1'b1;
      r = r[7] ? ((r << 1) ^ 8'h71) : (r << 1);
    end
    return rc;
  endfunction

  function automatic logic [1599:0] keccak_f(logic [1599:0] s);
    lanes_t a, b;
    logic [63:0] c [5], d [5];
    int x, y, tx, ty, off;
    for (int i = 0; i < 25; i++) a[i % 5][i / 5] = s[64*i +: 64];
    for (int ir = 0; ir < 24; ir++) begin
      for (int i = 0; i < 5; i++) c[i] = a[i][0] ^ a[i][1] ^ a[i][2] ^ a[i][3] ^ a[i][4];
      for (int i = 0; i < 5; i++) d[i] = c[(i + 4) % 5] ^ rol(c[(i + 1) % 5], 1);
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) a[i][j] ^= d[i];
      // rho: offsets from the walk (x,y) -> (y, 2x+3y), offset (t+1)(t+2)/2
      b = a;
      x = 1; y = 0;
      for (int t = 0; t < 24; t++) begin
        off = ((t + 1) * (t + 2) / 2);
        b[x][y] = rol(a[x][y], off);
        tx = y; ty = (2 * x + 3 * y) % 5;
        x = tx; y = ty;
      end
      // pi
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) a[j][(2*i + 3*j) % 5] = b[i][j];
      // chi
      b = a;
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
        a[i][j] = b[i][j] ^ (~b[(i + 1) % 5][j] & b[(i + 2) % 5][j]);
      a[0][0] ^= round_const(ir);
    end
    for (int i = 0; i < 25; i++) s[64*i +: 64] = a[i % 5][i / 5];
    return s;
  endfunction

  function automatic logic [255:0] sha3_256(byte unsigned m[$]);
    logic [1599:0] s;
    byte unsigned p[$];
    p = m;
    p.push_back(8'h06);
    while (p.size() % 136 != 0) p.push_back(8'h00);
    p[p.size() - 1] = p[p.size() - 1] | 8'h80;
    s = '0;
    for (int blk = 0; blk < p.size() / 136; blk++) begin
      for (int k = 0; k < 136; k++) s[8*k +: 8] ^= p[136*blk + k];
      s = keccak_f(s);
    end
    return s[255:0];
  endfunction

  function automatic logic [255:0] mac_ref(logic [255:0] key, byte unsigned m[$]);
    byte unsigned km[$];
    for (int k = 0; k < 32; k++) km.push_back(key[8*k +: 8]);
    return sha3_256({km, m});
  endfunction

endpackage
