// dft_pkg: constants and elaboration-time functions shared by the DFT arrays.
//
// Everything here is evaluated while the design elaborates, never in hardware:
// modular arithmetic for the prime-length (Rader) index maps, a search for the
// primitive root of a prime, and the fixed-point twiddle factors
// W^e = exp(-j*2*pi*e/N) quantised to CW-bit two's complement with CW-2
// fractional bits (so +1.0 is representable), rounded to nearest.
// The number formats are this design's choice; the source analysis leaves the
// word length L symbolic.
package dft_pkg;

  localparam real PI = 3.14159265358979323846;

  // (b^e) mod n for small non-negative operands
  function automatic int modpow(int b, int e, int n);
    int r = 1;
    int bb = b % n;
    for (int i = 0; i < e; i++) r = (r * bb) % n;
    return r;
  endfunction

  function automatic bit is_prime(int n);
    if (n < 2) return 1'b0;
    for (int d = 2; d * d <= n; d++)
      if (n % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // smallest g whose powers g^1..g^(n-1) run through every residue 1..n-1
  function automatic int prim_root(int n);
    for (int g = 2; g < n; g++) begin
      int ord = 0;
      int v = 1;
      for (int i = 1; i < n; i++) begin
        v = (v * g) % n;
        if (v == 1 && ord == 0) ord = i;
      end
      if (ord == n - 1) return g;
    end
    return 1;  // n = 2: the only residue is 1
  endfunction

  // quantised real and imaginary parts of W_n^e = exp(-j*2*pi*e/n)
  function automatic int tw_re(int e, int n, int cw);
    real s = real'(longint'(1) << (cw - 2));
    real v = $cos(2.0 * PI * real'(e % n) / real'(n)) * s;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int tw_im(int e, int n, int cw);
    real s = real'(longint'(1) << (cw - 2));
    real v = -$sin(2.0 * PI * real'(e % n) / real'(n)) * s;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // multiplicative inverse of a modulo n (a, n coprime), by search
  function automatic int modinv(int a, int n);
    for (int v = 1; v < n; v++)
      if ((a * v) % n == 1) return v;
    return (n == 1) ? 0 : 1;
  endfunction

  function automatic int gcd(int a, int b);
    int x = a, y = b, t;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // Good-Thomas output map: frequency k of the pair (k1 mod n1, k2 mod n2)
  function automatic int crt_index(int k1, int k2, int n1, int n2);
    return (k1 * n2 * modinv(n2 % n1, n1) + k2 * n1 * modinv(n1 % n2, n2)) % (n1 * n2);
  endfunction

  // frame of the two-array Good-Thomas engine: long enough for n1 transforms
  // of length n2 (n2-1 clocks each) and n2 of length n1 (n1-1 clocks each),
  // and a multiple of both bundle periods
  function automatic int gt_frame(int n1, int n2);
    int a = n1 - 1, b = n2 - 1;
    int l = a / gcd(a, b) * b;
    int need = (n1 * (n2 - 1) > n2 * (n1 - 1)) ? n1 * (n2 - 1) : n2 * (n1 - 1);
    return (need + l - 1) / l * l;
  endfunction

endpackage
