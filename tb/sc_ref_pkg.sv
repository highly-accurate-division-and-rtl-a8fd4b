// sc_ref_pkg: reference models used by the testbenches.
//
// Everything here is written from the circuit equations, bit by bit and
// cycle by cycle, without reusing any RTL module: an 8-bit LFSR for the
// polynomial x^8+x^6+x^5+x^4+1, the comparator rule (bit = rnd <= value), and
// the recurrences of the divider and the four square-root kernels with a
// delay element of D flip-flops that starts at 0. Streams are 255 bits long
// (index 0 is the first bit after `start`).
package sc_ref_pkg;

  typedef bit [254:0] stream_t;

  function automatic bit [7:0] ref_lfsr_next(bit [7:0] s);
    // Stage numbers 8, 6, 5, 4 of the polynomial are bits 7, 5, 4, 3.
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  // The random numbers of one period starting at `seed` (0 is treated as 1).
  function automatic void ref_rnd_seq(input bit [7:0] seed, output bit [7:0] seq [255]);
    bit [7:0] s = (seed == 0) ? 8'd1 : seed;
    for (int k = 0; k < 255; k++) begin
      seq[k] = s;
      s = ref_lfsr_next(s);
    end
  endfunction

  function automatic stream_t ref_sng(input bit [7:0] seed, input bit [7:0] v);
    bit [7:0] seq [255];
    stream_t  st;
    ref_rnd_seq(seed, seq);
    for (int k = 0; k < 255; k++) st[k] = (seq[k] <= v);
    return st;
  endfunction

  // Bit k of the delayed stream is bit k-d of the original, 0 before that.
  function automatic bit hist(input bit h [], input int k, input int d);
    return (k - d >= 0) ? h[k-d] : 1'b0;
  endfunction

  // Divider: J = (X&Y) delayed by d, K = X^Y; output bit k is Q after
  // input bit k has been clocked in.
  function automatic stream_t ref_div(input stream_t xs, input stream_t ys, input int d);
    bit      a [] = new[255];
    bit      q = 1'b0;
    stream_t z;
    for (int k = 0; k < 255; k++) begin
      bit j, kk;
      a[k] = xs[k] & ys[k];
      j    = hist(a, k, d);
      kk   = xs[k] ^ ys[k];
      if (j && kk)       q = !q;
      else if (j)        q = 1'b1;
      else if (kk)       q = 1'b0;
      z[k] = q;
    end
    return z;
  endfunction

  // Square-root kernels; variant 0..3 = A..D.
  function automatic stream_t ref_ssrc(input int variant, input stream_t in, input int d);
    bit      s [] = new[256];  // per-variant state stream fed to the DE
    bit      jk = 1'b0;        // SSRC-A flip-flop
    stream_t out;
    for (int k = 0; k < 255; k++) begin
      bit sd, o;
      case (variant)
        0: begin  // s is the JKFF output (one cycle of its own), then the DE
          s[k] = jk;
          sd   = hist(s, k, d);
          o    = in[k] | sd;
          jk   = o & !jk;
        end
        1: begin
          sd   = hist(s, k, d);
          o    = in[k] | sd;
          s[k] = o & !sd;
        end
        2: begin
          sd   = hist(s, k, d);
          o    = sd ? in[k] : 1'b1;
          s[k] = !(o && sd);
        end
        default: begin
          sd   = hist(s, k, d);
          o    = sd ? 1'b1 : in[k];
          s[k] = o & !sd;
        end
      endcase
      out[k] = o;
    end
    return out;
  endfunction

  function automatic real ideal_div(input int x, input int y);
    int mn = (x < y) ? x : y;
    int mx = (x < y) ? y : x;
    return (mx == 0) ? 0.0 : real'(mn) / real'(mx);
  endfunction

  function automatic real ideal_sqrt(input int v);
    return $sqrt(real'(v) / 255.0);
  endfunction

  // Equation of contrast stretching with bounds m, n (all /255).
  function automatic real ideal_cs(input int x, input int m, input int n);
    if (x < m) return 0.0;
    if (x > n) return 1.0;
    return real'(x - m) / real'(n - m);
  endfunction

endpackage
