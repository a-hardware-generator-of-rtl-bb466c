// mpd_ref_pkg: reference models used by the testbenches of the generator.
//
// ref_srg is a bit-serial model of the shift register generator: it keeps
// the bit history and produces one bit at a time by the recurrence
// a(k+1) = c1 a(k) ^ ... ^ c(n-1) a(k-n+2) ^ a(k-n+1), exactly as a software
// random bit generator would. ref_sample maps the random bits of one sample
// to a signed value index (-2..2, in units of the scheme's magnitudes) and
// ref_code turns that index into the 1-, 2- or 3-bit code. ref_pack builds a
// 32-bit transfer word from a list of codes.
package mpd_ref_pkg;

  localparam int HMAX = 544;

  class ref_srg;
    bit hist [HMAX];   // hist[i] = a(k-i)
    bit c    [HMAX];   // c[i] = ci, 1-based
    int n;

    function new(int order_n);
      n = order_n;
      foreach (hist[i]) hist[i] = 0;
      foreach (c[i]) c[i] = 0;
      hist[0] = 1;
    endfunction

    function void set_coef(int idx);
      c[idx] = 1;
    endfunction

    // Shift one 32-bit seed word in, bit 0 of the word becoming the newest
    function void seed_word(bit [31:0] w);
      for (int b = 31; b >= 0; b--) push(w[b]);
    endfunction

    function void push(bit b);
      for (int i = HMAX - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = b;
    endfunction

    function bit next();
      bit b;
      b = hist[n-1];                       // a(k-n+1), coefficient of x^n
      for (int i = 1; i < n; i++) if (c[i]) b ^= hist[i-1];
      push(b);
      return b;
    endfunction
  endclass

  function automatic int bits_for(int order);
    return order == 1 ? 1 : (order == 2 ? 3 : 5);
  endfunction

  // x[0] = first bit. Returns 0 and sets ok = 0 for a rejected combination.
  function automatic int ref_sample(int order, bit [4:0] x, output bit ok);
    int s, m;
    ok = 1;
    s  = x[0] ? -1 : 1;
    if (order == 1) return s;
    if (order == 2) begin
      m = x[1] + 2 * x[2];
      if (m == 3) begin ok = 0; return 0; end
      return (m == 2) ? s : 0;               // +-sqrt(3D) or 0
    end
    m = x[1] + 2 * x[2] + 4 * x[3] + 8 * x[4];
    if (m == 15) begin ok = 0; return 0; end
    if (m == 14) return 2 * s;               // +-sqrt(6D)
    if (m >= 9)  return 0;
    return s;                                // +-sqrt(D)
  endfunction

  function automatic bit [2:0] ref_code(int order, int v);
    bit [1:0] mag;
    if (order == 1) return (v < 0) ? 3'd1 : 3'd0;
    mag = 2'(v < 0 ? -v : v);
    return {mag, v < 0};
  endfunction

  function automatic int ref_width(int order);
    return order == 1 ? 1 : (order == 2 ? 2 : 3);
  endfunction

  function automatic int ref_per_word(int order);
    return order == 1 ? 32 : (order == 2 ? 16 : 10);
  endfunction

endpackage
