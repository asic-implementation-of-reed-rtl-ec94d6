// tb_rs_ref: reference model of the Reed-Solomon arithmetic for the testbenches.
//
// Built independently of the RTL: field products use log/antilog tables made
// by stepping alpha through the multiplicative group of GF(2^8) with
// i(x) = x^8+x^4+x^3+x^2+1, codewords are made by long division of
// x^(N-K) d(x) by g(x), and polynomials are evaluated term by term with table
// powers. Call ref_init() once before use. Polynomials in stream order have
// element 0 = highest degree (first symbol sent); coefficient arrays have
// element i = coefficient of x^i.
package tb_rs_ref;

  int exp_t [0:509];
  int log_t [0:255];

  function automatic void ref_init();
    int v = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i]       = v;
      exp_t[i + 255] = v;
      log_t[v]       = i;
      v = v << 1;
      if ((v & 256) != 0) v = v ^ 'h11D;
    end
    log_t[0] = 0;
  endfunction

  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int apow(int e);
    int ee = e % 255;
    if (ee < 0) ee += 255;
    return exp_t[ee];
  endfunction

  function automatic int inv(int a);
    return exp_t[(255 - log_t[a]) % 255];
  endfunction

  // generator polynomial coefficients, g[i] = coefficient of x^i
  function automatic void gen(int nsym, int fcr, ref int g[]);
    g = new[nsym + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int j = 0; j < nsym; j++) begin
      int rt = apow(fcr + j);
      for (int i = nsym; i > 0; i--) g[i] = g[i-1] ^ mul(g[i], rt);
      g[0] = mul(g[0], rt);
    end
  endfunction

  // systematic encoding, msg and cw in stream order
  function automatic void encode(int n, int k, int fcr, const ref int msg[], ref int cw[]);
    int g[];
    int rem[];
    int nsym = n - k;
    gen(nsym, fcr, g);
    // long division of msg(x) * x^nsym by g(x)
    rem = new[n];
    for (int i = 0; i < k; i++) rem[i] = msg[i];
    for (int i = k; i < n; i++) rem[i] = 0;
    for (int i = 0; i < k; i++) begin
      int c = rem[i];
      if (c != 0)
        for (int j = 0; j <= nsym; j++) rem[i + j] ^= mul(c, g[nsym - j]);
    end
    cw = new[n];
    for (int i = 0; i < k; i++) cw[i] = msg[i];
    for (int i = k; i < n; i++) cw[i] = rem[i];
  endfunction

  // value of a stream-order word at x (element i has degree n-1-i)
  function automatic int eval_word(const ref int w[], int x);
    int acc = 0;
    int n = w.size();
    for (int i = 0; i < n; i++)
      if (w[i] != 0 && x != 0) acc ^= mul(w[i], exp_t[(log_t[x] * (n - 1 - i)) % 255]);
      else if (w[i] != 0 && i == n - 1) acc ^= w[i];
    return acc;
  endfunction

  // value of a coefficient array at x
  function automatic int eval_coef(const ref int c[], int x);
    int acc = 0;
    int xp = 1;
    foreach (c[i]) begin
      acc ^= mul(c[i], xp);
      xp = mul(xp, x);
    end
    return acc;
  endfunction

  // message ROM contents of the codec
  function automatic int rom_word(int a);
    int a8 = a & 255;
    int lin = (a8 * 29 + 7) & 255;
    int rot = ((a8 << 3) | (a8 >> 5)) & 255;
    return lin ^ rot;
  endfunction

endpackage
