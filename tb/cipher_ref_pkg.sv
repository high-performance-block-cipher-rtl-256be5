// cipher_ref_pkg: reference models of Speck and Simon encryption for the
// testbenches. They are written in a plain sequential style, independent
// of the RTL: rotations bit by bit, addition with '+', the Simon constant
// sequences as character strings, round counts from their own table.
// Words are held in 64-bit variables with the bits above n at zero.
package cipher_ref_pkg;

  typedef logic [63:0] w64_t;
  typedef w64_t        wkeys_t [128];

  function automatic w64_t msk(int n);
    return (n == 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  function automatic w64_t rol(w64_t x, int r, int n);
    w64_t o = '0;
    for (int i = 0; i < n; i++) o[(i + r) % n] = x[i];
    return o;
  endfunction

  function automatic w64_t ror(w64_t x, int r, int n);
    return rol(x, n - r, n);
  endfunction

  // ---------------- Speck ----------------
  function automatic int speck_T(int n, int m);
    if (n == 16) return 22;
    if (n == 24) return 21 + m - 2;      // m=3:22, m=4:23
    if (n == 32) return 23 + m;          // 26, 27
    if (n == 48) return 26 + m;          // 28, 29
    return 30 + m;                       // 32, 33, 34
  endfunction

  function automatic void speck_keys(int n, int m, logic [255:0] key,
                                     output wkeys_t rk);
    int a = (n == 16) ? 7 : 8;
    int b = (n == 16) ? 2 : 3;
    w64_t l [160];
    w64_t k;
    int T = speck_T(n, m);
    k = key[63:0] & msk(n);
    for (int j = 0; j < m - 1; j++) l[j] = (key >> (n * (j + 1))) & msk(n);
    for (int i = 0; i < T; i++) begin
      rk[i] = k;
      l[i+m-1] = ((k + ror(l[i], a, n)) & msk(n)) ^ w64_t'(i);
      k = rol(k, b, n) ^ l[i+m-1];
    end
  endfunction

  function automatic logic [127:0] speck_enc(int n, int m, logic [255:0] key,
                                             logic [127:0] pt);
    int a = (n == 16) ? 7 : 8;
    int b = (n == 16) ? 2 : 3;
    wkeys_t rk;
    w64_t x, y;
    speck_keys(n, m, key, rk);
    x = (pt >> n) & msk(n);
    y = pt[63:0] & msk(n);
    for (int i = 0; i < speck_T(n, m); i++) begin
      x = ((ror(x, a, n) + y) & msk(n)) ^ rk[i];
      y = rol(y, b, n) ^ x;
    end
    return (128'(x) << n) | 128'(y);
  endfunction

  // ---------------- Simon ----------------
  // configurations in the order of the RTL mode encoding
  function automatic void simon_cfg(int mode, output int n, output int m,
                                    output int T, output int zj);
    case (mode)
      0: begin n = 32; m = 4; T = 44; zj = 3; end
      1: begin n = 48; m = 3; T = 54; zj = 3; end
      2: begin n = 64; m = 2; T = 68; zj = 2; end
      3: begin n = 64; m = 3; T = 69; zj = 3; end
      default: begin n = 64; m = 4; T = 72; zj = 4; end
    endcase
  endfunction

  function automatic bit zbit(int j, int i);
    string z2 = "10101111011100000011010010011000101000010001111110010110110011";
    string z3 = "11011011101011000110010111100000010010001010011100110100001111";
    string z4 = "11010001111001101011011000100000010111000011001010010011101111";
    string s  = (j == 2) ? z2 : (j == 3) ? z3 : z4;
    return s[i % 62] == "1";
  endfunction

  function automatic void simon_keys(int mode, logic [255:0] key,
                                     output wkeys_t rk);
    int n, m, T, zj;
    w64_t t;
    simon_cfg(mode, n, m, T, zj);
    for (int j = 0; j < m; j++) rk[j] = (key >> (n * j)) & msk(n);
    for (int i = m; i < T; i++) begin
      t = ror(rk[i-1], 3, n);
      if (m == 4) t = t ^ rk[i-3];
      t = t ^ ror(t, 1, n);
      rk[i] = (~rk[i-m] & msk(n)) ^ t ^ w64_t'(zbit(zj, i - m)) ^ 64'd3;
    end
  endfunction

  function automatic logic [127:0] simon_enc(int mode, logic [255:0] key,
                                             logic [127:0] pt);
    int n, m, T, zj;
    wkeys_t rk;
    w64_t x, y, tmp;
    simon_cfg(mode, n, m, T, zj);
    simon_keys(mode, key, rk);
    x = (pt >> n) & msk(n);
    y = pt[63:0] & msk(n);
    for (int i = 0; i < T; i++) begin
      tmp = x;
      x = y ^ (rol(x, 1, n) & rol(x, 8, n)) ^ rol(x, 2, n) ^ rk[i];
      y = tmp;
    end
    return (128'(x) << n) | 128'(y);
  endfunction

  function automatic logic [255:0] rand256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [127:0] rand128();
    logic [127:0] v;
    for (int i = 0; i < 4; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

endpackage
