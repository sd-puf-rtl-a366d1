// tb_ref_pkg: reference models used by the testbenches, written separately from
// the RTL: a bit-serial LFSR, the buffer delay/response model, the ones count and
// the masking rule, so that expected values do not come from the blocks under test.
package tb_ref_pkg;

  localparam int FULL = 1000;   // 10 uA in 10 nA units
  localparam int IREF = 956;    // 9.56 uA

  // Bit-serial Fibonacci LFSR x^16 + x^14 + x^13 + x^11 + 1: the output bit is
  // stage 16, the feedback enters stage 1.
  function automatic logic [63:0] ref_challenge(input logic [15:0] seed, input int skip_words);
    logic [15:0] s;
    logic [63:0] c;
    logic        fb;
    s = seed;
    for (int w = 0; w <= skip_words; w++) begin
      for (int k = 0; k < 64; k++) begin
        c[k] = s[15];
        fb   = s[15] ^ s[13] ^ s[12] ^ s[10];
        s    = (s << 1) | 16'(fb);
      end
    end
    return c;
  endfunction

  function automatic logic [31:0] ref_mix(input logic [31:0] x);
    logic [31:0] h;
    h = x ^ (x >> 16);
    h = h * 32'h85EBCA6B;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2AE35;
    return h ^ (h >> 16);
  endfunction

  // Write delay (ps) of buffer idx on die chip when written towards b.
  function automatic int ref_delay(input int unsigned chip, input int unsigned idx, input bit b);
    logic [31:0] key, h;
    int          sum;
    key = (chip * 32'h9E3779B1) ^ (idx * 32'h7F4A7C15) ^ (b ? 32'h165667B1 : 32'h0) ^ 32'h2545F491;
    h   = ref_mix(key);
    sum = 0;
    for (int i = 0; i < 4; i++) sum += int'(h[8*i +: 8]);
    return 2500 + ((sum - 510) * 27) / 32;
  endfunction

  // Current magnitude (10 nA units) of a buffer t ps after a write towards b.
  function automatic int ref_current(input int unsigned chip, input int unsigned idx, input bit b, input int t);
    int d;
    d = ref_delay(chip, idx, b);
    return (t >= d) ? FULL : (t * FULL) / d;
  endfunction

  function automatic logic [63:0] ref_raw(input int unsigned chip, input logic [15:0] seed, input int t);
    logic [63:0] c, r;
    c = ref_challenge(seed, 0);
    for (int i = 0; i < 64; i++) r[i] = (ref_current(chip, i, c[i], t) > IREF);
    return r;
  endfunction

  function automatic int ref_popcount(input logic [63:0] v);
    int n;
    n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

  // Bit i leaves the chain at step 63-i and meets mask bit (63-i) mod m.
  function automatic logic [63:0] ref_mask(input logic [63:0] raw, input logic [5:0] mask);
    logic [63:0] s;
    for (int i = 0; i < 64; i++) s[i] = raw[i] ^ mask[(63 - i) % 6];
    return s;
  endfunction

  // General form for an n-bit signature and an m-bit mask (n <= 64, m <= 16).
  function automatic logic [63:0] ref_mask_nm(input logic [63:0] raw, input logic [15:0] mask,
                                               input int n, input int m);
    logic [63:0] s;
    s = '0;
    for (int i = 0; i < n; i++) s[i] = raw[i] ^ mask[(n - 1 - i) % m];
    return s;
  endfunction

  function automatic int ref_hd(input logic [63:0] a, input logic [63:0] b, input int n);
    int d;
    d = 0;
    for (int i = 0; i < n; i++) d += int'(a[i] != b[i]);
    return d;
  endfunction

endpackage
