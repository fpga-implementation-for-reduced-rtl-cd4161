// sea_ref_pkg: bit-level reference model of SEA(n,b) for the testbenches.
//
// Written independently of the RTL: the S box is a table lookup on each
// 3-bit column instead of the bit-sliced formula, rotations are computed bit
// by bit from index arithmetic, and the round keys of a whole run are first
// collected in an array (forward states, then the same states in reverse
// order) and then applied, instead of being produced on the fly.
// A half block is held in a 256-bit vector with word i at bits [i*b +: b];
// bits above nb*b are zero.
package sea_ref_pkg;

  typedef logic [255:0] half_t;
  typedef half_t        key_list_t [];

  localparam int unsigned SBOX [8] = '{0, 5, 6, 7, 4, 3, 1, 2};

  function automatic logic get_bit(half_t x, int word, int bit_i, int b);
    return x[word * b + bit_i];
  endfunction

  function automatic half_t ref_sbox(half_t x, int nb, int b);
    half_t y = x;
    for (int g = 0; g < nb / 3; g++)
      for (int j = 0; j < b; j++) begin
        int unsigned v, s;
        v = {29'd0, x[(3*g+2)*b + j], x[(3*g+1)*b + j], x[(3*g)*b + j]};
        s = SBOX[v];
        y[(3*g)*b + j]   = s[0];
        y[(3*g+1)*b + j] = s[1];
        y[(3*g+2)*b + j] = s[2];
      end
    return y;
  endfunction

  function automatic half_t ref_add(half_t a, half_t k, int nb, int b);
    half_t y = '0;
    for (int i = 0; i < nb; i++) begin
      longint unsigned wa = 0, wk = 0, ws;
      for (int j = 0; j < b; j++) begin
        wa[j] = a[i*b + j];
        wk[j] = k[i*b + j];
      end
      ws = (wa + wk) % (64'd1 << b);
      for (int j = 0; j < b; j++) y[i*b + j] = ws[j];
    end
    return y;
  endfunction

  // R: word i goes to word (i+1) mod nb; inverse when inv = 1.
  function automatic half_t ref_wrot(half_t x, int nb, int b, bit inv);
    half_t y = '0;
    for (int i = 0; i < nb; i++)
      for (int j = 0; j < b; j++)
        if (!inv) y[((i + 1) % nb) * b + j] = x[i*b + j];
        else      y[i*b + j] = x[((i + 1) % nb) * b + j];
    return y;
  endfunction

  // r: word 3g rotated right by one, word 3g+2 rotated left by one.
  function automatic half_t ref_brot(half_t x, int nb, int b);
    half_t y = x;
    for (int g = 0; g < nb / 3; g++)
      for (int j = 0; j < b; j++) begin
        y[(3*g)*b + j]                 = x[(3*g)*b + ((j + 1) % b)];
        y[(3*g+2)*b + ((j + 1) % b)]   = x[(3*g+2)*b + j];
      end
    return y;
  endfunction

  function automatic half_t ref_f(half_t x, half_t k, int nb, int b);
    return ref_brot(ref_sbox(ref_add(x, k, nb, b), nb, b), nb, b);
  endfunction

  function automatic half_t ref_const(int i, int b);
    half_t c = '0;
    for (int j = 0; j < b; j++) c[j] = i[j];
    return c;
  endfunction

  // FE, FD and FK on (l, r); results returned through the ref arguments.
  function automatic void ref_fe(inout half_t l, inout half_t r, input half_t k,
                                 input int nb, input int b);
    half_t nr_ = ref_wrot(l, nb, b, 1'b0) ^ ref_f(r, k, nb, b);
    l = r;
    r = nr_;
  endfunction

  function automatic void ref_fd(inout half_t l, inout half_t r, input half_t k,
                                 input int nb, input int b);
    half_t nl = ref_wrot(r ^ ref_f(l, k, nb, b), nb, b, 1'b1);
    r = l;
    l = nl;
  endfunction

  function automatic void ref_fk(inout half_t kl, inout half_t kr, input int c,
                                 input int nb, input int b);
    half_t t = ref_f(kr, ref_const(c, b), nb, b);
    half_t nkr = kl ^ ref_wrot(t, nb, b, 1'b0);
    kl = kr;
    kr = nkr;
  endfunction

  // Round keys k[1..nr] (index 0 unused) for an odd nr: the first
  // (nr+1)/2 keys are KR of the forward states s0, s1, ..., the remaining
  // ones repeat them in reverse order.
  function automatic key_list_t ref_round_keys(half_t kl, half_t kr, int nb,
                                               int b, int nr);
    key_list_t ks = new[nr + 1];
    int hm = (nr + 1) / 2;
    half_t st_r [] = new[hm];
    for (int i = 0; i < hm; i++) begin
      st_r[i] = kr;
      if (i < hm - 1) ref_fk(kl, kr, i + 1, nb, b);
    end
    for (int i = 1; i <= nr; i++)
      ks[i] = (i <= hm) ? st_r[i-1] : st_r[nr - i];
    ks[0] = '0;
    return ks;
  endfunction

  function automatic void ref_encrypt(inout half_t l, inout half_t r,
                                      input half_t kl, input half_t kr,
                                      input int nb, input int b, input int nr);
    key_list_t ks = ref_round_keys(kl, kr, nb, b, nr);
    for (int i = 1; i <= nr; i++) ref_fe(l, r, ks[i], nb, b);
  endfunction

  function automatic void ref_decrypt(inout half_t l, inout half_t r,
                                      input half_t kl, input half_t kr,
                                      input int nb, input int b, input int nr);
    key_list_t ks = ref_round_keys(kl, kr, nb, b, nr);
    for (int i = nr; i >= 1; i--) ref_fd(l, r, ks[i], nb, b);
  endfunction

  // Random half block of nb*b bits.
  function automatic half_t rand_half(int nb, int b);
    half_t x = '0;
    for (int i = 0; i < nb * b; i++) x[i] = 1'($urandom);
    return x;
  endfunction

endpackage
