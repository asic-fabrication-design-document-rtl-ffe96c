// sha256_ref_pkg: reference model of SHA-256 and of Bitcoin's double hash,
// used by the testbenches to work out expected values independently of the
// RTL. The round constants and the initial hash value are not copied from a
// table: they are computed from their definition (the first 32 bits of the
// fractional parts of the cube roots of the first 64 primes, and of the
// square roots of the first 8 primes). The compression is written directly
// from the FIPS 180-4 equations with a full 64-word schedule.
package sha256_ref_pkg;

  function automatic bit [31:0] frac32(real x);
    real f;
    f = x - $floor(x);
    return 32'($floor(f * 4294967296.0));
  endfunction

  function automatic int unsigned nth_prime(int unsigned n);
    int unsigned cnt, c;
    bit isp;
    cnt = 0;
    c = 1;
    while (cnt <= n) begin
      c++;
      isp = 1;
      for (int unsigned d = 2; d * d <= c; d++) if (c % d == 0) isp = 0;
      if (isp) cnt++;
    end
    return c;
  endfunction

  function automatic bit [31:0] ref_k(int unsigned i);
    return frac32(real'(nth_prime(i)) ** (1.0 / 3.0));
  endfunction

  function automatic bit [255:0] ref_iv();
    bit [255:0] v;
    for (int i = 0; i < 8; i++) v[255 - 32*i -: 32] = frac32($sqrt(real'(nth_prime(i))));
    return v;
  endfunction

  function automatic bit [31:0] rr(bit [31:0] x, int n);
    return {x, x} >> n;
  endfunction

  function automatic bit [31:0] ref_schedule(bit [511:0] blk, int t);
    bit [31:0] w [64];
    for (int i = 0; i < 16; i++) w[i] = blk[511 - 32*i -: 32];
    for (int i = 16; i < 64; i++)
      w[i] = (rr(w[i-2], 17) ^ rr(w[i-2], 19) ^ (w[i-2] >> 10)) + w[i-7]
           + (rr(w[i-15], 7) ^ rr(w[i-15], 18) ^ (w[i-15] >> 3)) + w[i-16];
    return w[t];
  endfunction

  // one round applied to state s = {a..h}
  function automatic bit [255:0] ref_round(bit [255:0] s, bit [31:0] k, bit [31:0] w);
    bit [31:0] a, b, c, d, e, f, g, h, t1, t2;
    {a, b, c, d, e, f, g, h} = s;
    t1 = h + (rr(e, 6) ^ rr(e, 11) ^ rr(e, 25)) + ((e & f) ^ (~e & g)) + k + w;
    t2 = (rr(a, 2) ^ rr(a, 13) ^ rr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
    return {t1 + t2, a, b, c, d + t1, e, f, g};
  endfunction

  function automatic bit [255:0] ref_compress(bit [255:0] hin, bit [511:0] blk);
    bit [255:0] s, r;
    s = hin;
    for (int t = 0; t < 64; t++) s = ref_round(s, ref_k(t), ref_schedule(blk, t));
    for (int i = 0; i < 8; i++) r[32*i +: 32] = hin[32*i +: 32] + s[32*i +: 32];
    return r;
  endfunction

  // double SHA-256 of a 640-bit header given as 20 message words
  function automatic bit [255:0] ref_dsha(bit [639:0] hdr);
    bit [1023:0] m;
    bit [255:0]  d1;
    m  = {hdr, 1'b1, 319'd0, 64'd640};
    d1 = ref_compress(ref_compress(ref_iv(), m[1023:512]), m[511:0]);
    return ref_compress(ref_iv(), {d1, 1'b1, 191'd0, 64'd256});
  endfunction

  function automatic bit [255:0] ref_midstate(bit [639:0] hdr);
    return ref_compress(ref_iv(), hdr[639:128]);
  endfunction

  function automatic bit [255:0] ref_bswap(bit [255:0] x);
    bit [255:0] r;
    for (int i = 0; i < 32; i++) r[8*i +: 8] = x[255 - 8*i -: 8];
    return r;
  endfunction

  // Bitcoin's compact target: mantissa * 256^(exponent-3); the bits field is
  // given as the message word, i.e. with its four bytes reversed
  function automatic bit [255:0] ref_target(bit [31:0] bits_word);
    bit [31:0]  b;
    bit [255:0] m;
    b = {bits_word[7:0], bits_word[15:8], bits_word[23:16], bits_word[31:24]};
    m = 256'(b[23:0]);
    return m << (8 * (int'(b[31:24]) - 3));
  endfunction

  // the genesis block header of Bitcoin, as message words
  localparam bit [639:0] GENESIS = {
    32'h01000000, 256'h0,
    256'h3ba3edfd7a7b12b27ac72c3e67768f617fc81bc3888a51323a9fb8aa4b1e5e4a,
    32'h29ab5f49, 32'hffff001d, 32'h1dac2b7c};
  // its published block hash, in display (big-number) order
  localparam bit [255:0] GENESIS_HASH =
    256'h000000000019d6689c085ae165831e934ff763ae46a2a6c172b3f1b60a8ce26f;

  // block 125552 of the Bitcoin chain, as message words, and its block hash
  localparam bit [639:0] BLOCK_125552 = {
    32'h01000000,
    256'h81cd02ab7e569e8bcd9317e2fe99f2de44d49ab2b8851ba4a308000000000000,
    256'he320b6c2fffc8d750423db8b1eb942ae710e951ed797f7affc8892b0f1fc122b,
    32'hc7f5d74d, 32'hf2b9441a, 32'h42a14695};
  localparam bit [255:0] BLOCK_125552_HASH =
    256'h00000000000000001e8d6829a8a21adc5d38d0a473b144b6765798e61f98bd1d;

endpackage
