// rc6_ref_pkg: behavioural reference model of RC6-32/r/b for the testbenches.
//
// Written straight from the RC6 definition with ordinary SystemVerilog
// arithmetic (a full 32x32 multiplication for f, shift-based rotations), so it
// shares no structure with the RTL. Blocks and keys use the RC6 byte order:
// byte 0 in bits [7:0], A = [31:0] ... D = [127:96].
package rc6_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t        sarr_t [0:255];

  function automatic w32_t rol(w32_t x, int unsigned n);
    n = n % 32;
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  function automatic w32_t ror(w32_t x, int unsigned n);
    n = n % 32;
    return (n == 0) ? x : ((x >> n) | (x << (32 - n)));
  endfunction

  function automatic w32_t fq(w32_t x);
    logic [63:0] p;
    p = 64'(x) * (64'(x) * 64'd2 + 64'd1);
    return p[31:0];
  endfunction

  // Key expansion for a key of nbytes bytes (nbytes <= 32), r rounds.
  function automatic sarr_t expand(logic [255:0] key, int nbytes, int r);
    sarr_t s;
    w32_t  l [0:7];
    w32_t  a, b;
    int    c, t, i, j, v;
    c = (nbytes + 3) / 4;
    if (c == 0) c = 1;
    for (int k = 0; k < 8; k++) l[k] = 0;
    for (int k = 0; k < nbytes; k++) l[k/4] |= w32_t'(key[8*k +: 8]) << (8 * (k % 4));
    t = 2 * r + 4;
    s[0] = 32'hB7E15163;
    for (int k = 1; k < t; k++) s[k] = s[k-1] + 32'h9E3779B9;
    a = 0; b = 0; i = 0; j = 0;
    v = 3 * ((c > t) ? c : t);
    for (int k = 0; k < v; k++) begin
      a = rol(s[i] + a + b, 3);
      s[i] = a;
      b = rol(l[j] + a + b, (a + b) % 32);
      l[j] = b;
      i = (i + 1) % t;
      j = (j + 1) % c;
    end
    return s;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] blk, sarr_t s, int r);
    w32_t a, b, c, d, t, u, tmp;
    {d, c, b, a} = blk;
    b = b + s[0];
    d = d + s[1];
    for (int i = 1; i <= r; i++) begin
      t = rol(fq(b), 5);
      u = rol(fq(d), 5);
      a = rol(a ^ t, u % 32) + s[2*i];
      c = rol(c ^ u, t % 32) + s[2*i+1];
      tmp = a; a = b; b = c; c = d; d = tmp;
    end
    a = a + s[2*r+2];
    c = c + s[2*r+3];
    return {d, c, b, a};
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] blk, sarr_t s, int r);
    w32_t a, b, c, d, t, u, tmp;
    {d, c, b, a} = blk;
    c = c - s[2*r+3];
    a = a - s[2*r+2];
    for (int i = r; i >= 1; i--) begin
      tmp = d; d = c; c = b; b = a; a = tmp;
      u = rol(fq(d), 5);
      t = rol(fq(b), 5);
      c = ror(c - s[2*i+1], t % 32) ^ u;
      a = ror(a - s[2*i], u % 32) ^ t;
    end
    d = d - s[1];
    b = b - s[0];
    return {d, c, b, a};
  endfunction

  // One encryption (dec = 0) or decryption (dec = 1) round with keys ke, ko.
  function automatic logic [127:0] round(logic [127:0] blk, w32_t ke, w32_t ko, bit dec);
    w32_t a, b, c, d, t, u, tmp;
    {d, c, b, a} = blk;
    if (!dec) begin
      t = rol(fq(b), 5);
      u = rol(fq(d), 5);
      a = rol(a ^ t, u % 32) + ke;
      c = rol(c ^ u, t % 32) + ko;
      tmp = a; a = b; b = c; c = d; d = tmp;
    end else begin
      tmp = d; d = c; c = b; b = a; a = tmp;
      u = rol(fq(d), 5);
      t = rol(fq(b), 5);
      c = ror(c - ko, t % 32) ^ u;
      a = ror(a - ke, u % 32) ^ t;
    end
    return {d, c, b, a};
  endfunction

  // Byte string written left to right (first byte leftmost) -> RC6 block order.
  function automatic logic [127:0] bytes_le(logic [127:0] s);
    logic [127:0] r;
    for (int k = 0; k < 16; k++) r[8*k +: 8] = s[127 - 8*k -: 8];
    return r;
  endfunction

endpackage
