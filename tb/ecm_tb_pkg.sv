// ecm_tb_pkg: reference arithmetic for the ECM testbenches.
//
// Big integers are held in 512-bit vectors. make_modulus() draws a random odd
// modulus M of a given size and returns the scaled modulus Mt = M * (-M^-1 mod
// 2^17) that the datapath uses; the other functions are plain modular
// arithmetic written independently of the RTL.
package ecm_tb_pkg;
  typedef logic [511:0] big_t;

  function automatic big_t rand_big(input int bits);
    big_t v;
    v = '0;
    for (int i = 0; i < 16; i++) v[i*32 +: 32] = $urandom;
    if (bits < 512) v = v & ((big_t'(1) << bits) - 1);
    return v;
  endfunction

  // -m^-1 mod 2^17 for odd m
  function automatic logic [16:0] neg_inv17(input logic [16:0] m0);
    logic [16:0] x;
    x = 17'd1;
    for (int i = 0; i < 6; i++) x = x * (17'd2 - m0 * x);
    return -x;
  endfunction

  function automatic big_t make_modulus(input int bits, output big_t m);
    m = rand_big(bits);
    m[bits-1] = 1'b1;
    m[0] = 1'b1;
    return m * big_t'(neg_inv17(m[16:0]));
  endfunction

  function automatic big_t mulmod(input big_t a, input big_t b, input big_t m);
    logic [1023:0] p;
    p = {512'b0, a} * {512'b0, b};
    return big_t'(p % {512'b0, m});
  endfunction

  function automatic big_t addmod(input big_t a, input big_t b, input big_t m);
    return ((a % m) + (b % m)) % m;
  endfunction

  function automatic big_t submod(input big_t a, input big_t b, input big_t m);
    return ((a % m) + m - (b % m)) % m;
  endfunction

  // 2^e mod m
  function automatic big_t pow2mod(input int e, input big_t m);
    big_t r;
    r = big_t'(1) % m;
    for (int i = 0; i < e; i++) r = (r << 1) % m;
    return r;
  endfunction

  // points (X:Z) on a Montgomery curve, plain modular arithmetic mod m
  typedef struct { big_t x; big_t z; } pt_t;

  // a + b given d = a - b
  function automatic pt_t xadd(input pt_t a, input pt_t b, input pt_t d, input big_t m);
    big_t u, v, s, t;
    pt_t o;
    u = mulmod(submod(a.x, a.z, m), addmod(b.x, b.z, m), m);
    v = mulmod(addmod(a.x, a.z, m), submod(b.x, b.z, m), m);
    s = addmod(u, v, m);
    t = submod(u, v, m);
    o.x = mulmod(d.z, mulmod(s, s, m), m);
    o.z = mulmod(d.x, mulmod(t, t, m), m);
    return o;
  endfunction

  function automatic pt_t xdbl(input pt_t a, input big_t a24, input big_t m);
    big_t s, d, t;
    pt_t o;
    s = mulmod(addmod(a.x, a.z, m), addmod(a.x, a.z, m), m);
    d = mulmod(submod(a.x, a.z, m), submod(a.x, a.z, m), m);
    t = submod(s, d, m);
    o.x = mulmod(s, d, m);
    o.z = mulmod(t, addmod(d, mulmod(a24, t, m), m), m);
    return o;
  endfunction

  function automatic bit prime(input int n);
    if (n < 2) return 0;
    for (int q = 2; q * q <= n; q++) if (n % q == 0) return 0;
    return 1;
  endfunction

  // scalar k: product of the largest prime powers not above b1
  function automatic logic [1535:0] scalar(input int b1);
    logic [1535:0] k;
    k = 1;
    for (int p = 2; p <= b1; p++)
      if (prime(p)) begin
        int pe;
        pe = 1;
        while (pe * p <= b1) begin pe *= p; k = k * 1536'(p); end
      end
    return k;
  endfunction

  // Reference ECM run: phase 1 ladder from P = (px:1), then phase 2 with the
  // 24 baby steps j < 105 coprime to 210 and giant steps of 210 up to b2.
  // Returns Q, the baby-step table, D*Q and the product d.
  function automatic void ecm_ref(input big_t px, input big_t a24, input big_t m,
                                  input int b1, input int b2,
                                  output pt_t q, output pt_t tbl [24], output pt_t dq,
                                  output big_t d, output int nprod);
    logic [1535:0] k;
    int kb, ns;
    pt_t r0, r1, p, nx, q2, rr, rp;
    pt_t odd [106];
    int  js [24];
    k = scalar(b1);
    kb = 0;
    for (int i = 0; i < 1536; i++) if (k[i]) kb = i + 1;
    p.x = px; p.z = 1;
    r0.x = 1; r0.z = 0; r1 = p;
    for (int i = kb - 1; i >= 0; i--) begin
      if (k[i]) begin nx = xadd(r1, r0, p, m); r1 = xdbl(r1, a24, m); r0 = nx; end
      else      begin nx = xadd(r0, r1, p, m); r0 = xdbl(r0, a24, m); r1 = nx; end
    end
    q = r0;
    ns = 0;
    for (int j = 1; j < 105; j += 2)
      if (j % 3 != 0 && j % 5 != 0 && j % 7 != 0) js[ns++] = j;
    q2 = xdbl(q, a24, m);
    odd[1] = q;
    odd[3] = xadd(q2, q, q, m);
    for (int j = 5; j <= 105; j += 2) odd[j] = xadd(odd[j-2], q2, odd[j-4], m);
    for (int s = 0; s < 24; s++) tbl[s] = odd[js[s]];
    dq = xdbl(odd[105], a24, m);
    rr = dq;
    rp = xdbl(rr, a24, m);
    d = 1;
    nprod = 0;
    for (int mi = 1; mi <= (b2 + 103) / 210; mi++) begin
      for (int s = 0; s < 24; s++) begin
        int lo, hi;
        lo = mi * 210 - js[s];
        hi = mi * 210 + js[s];
        if ((lo > b1 && lo <= b2 && prime(lo)) || (hi > b1 && hi <= b2 && prime(hi))) begin
          d = mulmod(d, submod(mulmod(rr.x, tbl[s].z, m), mulmod(tbl[s].x, rr.z, m), m), m);
          nprod++;
        end
      end
      nx = xadd(rp, dq, rr, m);
      rr = rp;
      rp = nx;
    end
  endfunction
endpackage
