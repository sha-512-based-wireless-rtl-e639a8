// sha512_ref_pkg -- behavioural SHA-512 reference for the testbenches.
//
// A straightforward, untimed model of SHA-512 written apart from the RTL: it
// derives the round constants and the initial hash value from their
// definitions (fractional parts of cube and square roots of the first primes,
// found by integer root search), pads a message of whole 64-bit words and
// hashes it. Used only by testbenches to work out expected values.
package sha512_ref_pkg;

  typedef logic [63:0] w64;

  function automatic w64 r_rotr(w64 x, int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic int nth_prime(int n);   // n = 0 -> 2
    int cnt = -1;
    for (int v = 2; ; v++) begin
      bit is_p = 1;
      for (int d = 2; d * d <= v; d++) if (v % d == 0) is_p = 0;
      if (is_p) begin
        cnt++;
        if (cnt == n) return v;
      end
    end
  endfunction

  // floor(root_k(p * 2^(64k))) mod 2^64, k = 2 or 3
  function automatic w64 frac_root(int p, int k);
    logic [255:0] n, r, tst, pw;
    n = 256'(p) << (64 * k);
    r = '0;
    for (int b = 70; b >= 0; b--) begin
      tst = r | (256'(1) << b);
      pw  = (k == 3) ? tst * tst * tst : tst * tst;
      if (pw <= n) r = tst;
    end
    return r[63:0];
  endfunction

  function automatic w64 ref_k(int t);
    return frac_root(nth_prime(t), 3);
  endfunction

  function automatic w64 ref_iv(int i);
    return frac_root(nth_prime(i), 2);
  endfunction

  // padded message: words, 0x80.. word, zeros, 128-bit length
  function automatic void ref_pad(input w64 msg[$], output w64 padded[$]);
    int n = msg.size();
    int total = ((n + 3 + 15) / 16) * 16;
    padded = {};
    for (int i = 0; i < total; i++) begin
      if (i < n) padded.push_back(msg[i]);
      else if (i == n) padded.push_back(64'h8000_0000_0000_0000);
      else if (i == total - 1) padded.push_back(64'(n) * 64);
      else padded.push_back('0);
    end
  endfunction

  function automatic void ref_schedule(input w64 blk[16], output w64 w[80]);
    for (int t = 0; t < 80; t++) begin
      if (t < 16) w[t] = blk[t];
      else w[t] = (r_rotr(w[t-2], 19) ^ r_rotr(w[t-2], 61) ^ (w[t-2] >> 6)) + w[t-7]
                + (r_rotr(w[t-15], 1) ^ r_rotr(w[t-15], 8) ^ (w[t-15] >> 7)) + w[t-16];
    end
  endfunction

  function automatic void ref_compress(input w64 blk[16], inout w64 hv[8]);
    w64 w[80];
    w64 a, b, c, d, e, f, g, h, t1, t2;
    ref_schedule(blk, w);
    {a, b, c, d, e, f, g, h} = {hv[0], hv[1], hv[2], hv[3], hv[4], hv[5], hv[6], hv[7]};
    for (int t = 0; t < 80; t++) begin
      t1 = h + (r_rotr(e, 14) ^ r_rotr(e, 18) ^ r_rotr(e, 41)) + ((e & f) ^ (~e & g))
             + ref_k(t) + w[t];
      t2 = (r_rotr(a, 28) ^ r_rotr(a, 34) ^ r_rotr(a, 39)) + ((a & b) ^ (a & c) ^ (b & c));
      h = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
    end
    hv[0] += a; hv[1] += b; hv[2] += c; hv[3] += d;
    hv[4] += e; hv[5] += f; hv[6] += g; hv[7] += h;
  endfunction

  function automatic void ref_hash(input w64 msg[$], output w64 hv[8]);
    w64 padded[$];
    w64 blk[16];
    ref_pad(msg, padded);
    for (int i = 0; i < 8; i++) hv[i] = ref_iv(i);
    for (int bi = 0; bi < padded.size() / 16; bi++) begin
      for (int j = 0; j < 16; j++) blk[j] = padded[bi*16 + j];
      ref_compress(blk, hv);
    end
  endfunction

endpackage
