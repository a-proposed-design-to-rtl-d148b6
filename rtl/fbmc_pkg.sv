// fbmc_pkg - types, constants and elaboration-time functions shared by the
// FBMC transceiver.
//
// Samples are complex numbers with DW-bit two's-complement real and imaginary
// parts (cplx_t). Twiddle factors are Q2.14 numbers in 16 bits, so that the
// three table values C, C-D and C+D of the three-multiplier complex product
// (|C+D| <= 1.414) all fit. The prototype filter is the K=4 frequency-sampling
// design commonly used for FBMC (PHYDYAS), scaled to a peak of 1.0 in Q1.14.
// The word lengths and the scaling are this design's choice; the filter-bank
// sizes (M, K, L=K*M) and the three-multiplier product follow the source
// design.
package fbmc_pkg;

  localparam int DW     = 16;   // bits per real / imaginary part
  localparam int TWW    = 16;   // twiddle word width
  localparam int TWF    = 14;   // twiddle fraction bits (1.0 = 16384)
  localparam int CW     = 16;   // prototype coefficient width
  localparam int CF     = 14;   // prototype coefficient fraction bits

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Which polyphase network a DA engine serves.
  typedef enum logic {PPN_SFB = 1'b0, PPN_AFB = 1'b1} ppn_mode_e;

  localparam real PI = 3.14159265358979323846;

  // Round a real to the nearest integer.
  function automatic int rnd(real v);
    return int'($floor(v + 0.5));
  endfunction

  // cos / sin of 2*pi*e/n in Q2.14.
  function automatic int tw_cos(int e, int n);
    return rnd($cos(2.0 * PI * real'(e) / real'(n)) * real'(1 << TWF));
  endfunction
  function automatic int tw_sin(int e, int n);
    return rnd($sin(2.0 * PI * real'(e) / real'(n)) * real'(1 << TWF));
  endfunction

  // Prototype filter tap l (0..K*M-1), frequency sampling with K=4:
  // p[l] = 1 + 2*sum_{k=1..3} (-1)^k H_k cos(2*pi*k*(l+1)/(K*M)),
  // H1 = 0.97195983, H2 = 1/sqrt(2), H3 = 0.23514695, divided by its peak
  // value 1 + 2*(H1+H2+H3) and given in Q1.14.
  function automatic int proto_coef(int l, int m, int k);
    real h1, h2, h3, v, peak, arg;
    h1   = 0.97195983;
    h2   = 0.70710678;
    h3   = 0.23514695;
    arg  = 2.0 * PI * real'(l + 1) / real'(k * m);
    v    = 1.0 - 2.0 * h1 * $cos(arg) + 2.0 * h2 * $cos(2.0 * arg) - 2.0 * h3 * $cos(3.0 * arg);
    peak = 1.0 + 2.0 * (h1 + h2 + h3);
    return rnd(v / peak * real'(1 << CF));
  endfunction

  // Coefficient seen by tap t in phase ph of a polyphase network.
  //   synthesis: p[ph + t*M/2], ph < M/2, t < 2K
  //   analysis : p[ph + t*M],   ph < M,   t < K
  function automatic int ppn_coef(ppn_mode_e mode, int m, int k, int ph, int t);
    if (mode == PPN_SFB) return proto_coef(ph + t * (m / 2), m, k);
    else                 return proto_coef(ph + t * m, m, k);
  endfunction

  // Round (add half an LSB) and shift right by f, then saturate to DW bits.
  function automatic sample_t round_sat(logic signed [47:0] v, int f);
    logic signed [47:0] r;
    r = (f > 0) ? ((v + (48'sd1 <<< (f - 1))) >>> f) : v;
    if (r > 48'sd32767)       return sample_t'(16'sh7fff);
    else if (r < -48'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(r[DW-1:0]);
  endfunction

  // Complex product (a + jb)(c + jd) with three real multipliers:
  //   re = (c - d) b + c (a - b),   im = (c + d) a - c (a - b)
  // cmd = c - d, cpd = c + d, all Q2.14. Result rounded back to DW bits.
  function automatic cplx_t cmul3(cplx_t x, logic signed [TWW-1:0] c,
                                  logic signed [TWW-1:0] cmd,
                                  logic signed [TWW-1:0] cpd);
    logic signed [DW:0]  amb;
    logic signed [47:0]  p1, p2, p3;
    cplx_t               y;
    amb = {x.re[DW-1], x.re} - {x.im[DW-1], x.im};
    p1  = 48'(cmd) * 48'(x.im);
    p2  = 48'(c)   * 48'(amb);
    p3  = 48'(cpd) * 48'(x.re);
    y.re = round_sat(p1 + p2, TWF);
    y.im = round_sat(p3 - p2, TWF);
    return y;
  endfunction

  // Arithmetic halving of a complex sum / difference (used by the scaled
  // butterflies). Inputs are DW+1 bits wide, the result DW bits.
  function automatic sample_t half(logic signed [DW:0] v);
    return sample_t'(v >>> 1);
  endfunction

endpackage
