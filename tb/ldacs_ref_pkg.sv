// ldacs_ref_pkg: reference models used by the testbenches. They are written
// independently of the RTL (plain loops over bit and byte queues, with
// divisions and modulos where the RTL uses counters) so a testbench can
// compare the hardware against them.
package ldacs_ref_pkg;
  import ldacs_pkg::*;

  typedef bit      bitq_t [$];
  typedef byte unsigned byteq_t [$];
  typedef int      intq_t [$];

  // PRBS 1 + x^14 + x^15 mask bytes for one block, seed 100101010000000.
  function automatic byteq_t ref_prbs_bytes(int n);
    byteq_t q;
    bit [14:0] s;
    s = 15'b100101010000000;
    for (int k = 0; k < n; k++) begin
      byte unsigned m;
      m = 0;
      for (int b = 0; b < 8; b++) begin
        bit fb;
        fb = s[14] ^ s[13];
        m  = (m << 1) | 8'(fb);
        s  = {s[13:0], fb};
      end
      q.push_back(m);
    end
    return q;
  endfunction

  // Evaluate a codeword (first byte = highest degree) at alpha^j.
  function automatic byte unsigned ref_rs_eval(byteq_t cw, int j);
    gf_t acc, a;
    acc = 0;
    a   = gf_pow_alpha(j);
    foreach (cw[i]) acc = gf_mul(acc, a) ^ cw[i];
    return acc;
  endfunction

  // Bits of a byte queue, MSB first.
  function automatic bitq_t ref_bytes_to_bits(byteq_t b);
    bitq_t q;
    foreach (b[i]) for (int k = 7; k >= 0; k--) q.push_back(b[i][k]);
    return q;
  endfunction

  // Punctured K=7 rate-1/2 encoder with 6 zero tail bits, padded to cap.
  // Shift-register formulation: reg[0] newest, taps listed per generator.
  function automatic bitq_t ref_conv_encode(bitq_t u, int rate, int cap);
    bitq_t q;
    bit [6:0] r;          // r[0] = current input, r[i] = input i steps ago
    int n, per, ph;
    bitq_t uu;
    uu = u;
    for (int t = 0; t < 6; t++) uu.push_back(1'b0);
    per = (rate == 1) ? 2 : (rate == 2) ? 3 : 1;
    r = 0;
    n = uu.size();
    for (int k = 0; k < n; k++) begin
      bit x, y, kx, ky;
      r  = {r[5:0], uu[k]};
      // 171 octal = 1 111 001: taps at delays 0,1,2,3,6
      x  = r[0] ^ r[1] ^ r[2] ^ r[3] ^ r[6];
      // 133 octal = 1 011 011: taps at delays 0,2,3,5,6
      y  = r[0] ^ r[2] ^ r[3] ^ r[5] ^ r[6];
      ph = k % per;
      kx = 1; ky = 1;
      if (rate == 1 && ph == 1) kx = 0;
      if (rate == 2 && ph == 1) kx = 0;
      if (rate == 2 && ph == 2) ky = 0;
      if (kx) q.push_back(x);
      if (ky) q.push_back(y);
    end
    while (q.size() < cap) q.push_back(1'b0);
    return q;
  endfunction

  // Index into the input block of output k of the helical interleaver.
  function automatic int ref_helical_src(int k, int rows, int cols, int shift);
    int r, c;
    r = k % rows;
    c = k / rows;
    return r * cols + ((c + r * shift) % cols);
  endfunction

  // Per-axis level (unscaled) of the Gray map, bits a0 (sign) a1 a2.
  function automatic int ref_level(int m, bit a0, bit a1, bit a2);
    int mag;
    if (m == 0) mag = 1;
    else if (m == 1) mag = a1 ? 3 : 1;
    else mag = (!a1 && a2) ? 1 : (!a1 && !a2) ? 3 : (a1 && !a2) ? 5 : 7;
    return a0 ? -mag : mag;
  endfunction

  // Systematic RS encoding by polynomial long division: message followed by
  // the remainder of m(x)*x^(2T) mod prod_{j<2T} (x + alpha^j).
  function automatic byteq_t ref_rs_encode(byteq_t msg, int t);
    gf_t g [$];
    gf_t rem [$];
    byteq_t cw;
    int nr;
    nr = 2 * t;
    g.push_back(8'h01);                         // g[i] = coefficient of x^i
    for (int j = 0; j < nr; j++) begin
      gf_t a;
      gf_t ng [$];
      a = gf_pow_alpha(j);
      for (int i = 0; i <= g.size(); i++) begin
        gf_t lo, hi;
        lo = (i < g.size()) ? gf_mul(g[i], a) : 8'h00;
        hi = (i > 0) ? g[i-1] : 8'h00;
        ng.push_back(lo ^ hi);
      end
      g = ng;
    end
    // dividend, highest degree first
    foreach (msg[i]) rem.push_back(msg[i]);
    for (int i = 0; i < nr; i++) rem.push_back(8'h00);
    for (int i = 0; i < msg.size(); i++) begin
      gf_t f;
      f = rem[i];
      if (f != 0) for (int k = 0; k <= nr; k++) rem[i + k] ^= gf_mul(f, g[nr - k]);
    end
    cw = msg;
    for (int i = 0; i < nr; i++) cw.push_back(rem[msg.size() + i]);
    return cw;
  endfunction

endpackage
