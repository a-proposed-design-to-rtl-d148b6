// tb_ref_pkg - reference arithmetic for the filter-bank testbenches.
//
// An independent statement of the prototype filter (K = 4 frequency
// sampling, peak-normalised, Q1.14) and of the Q1.14 rounding used by the
// polyphase networks, so the testbenches can predict their outputs exactly.
package tb_ref_pkg;

  localparam real PI_R = 3.14159265358979323846;

  function automatic int proto(int l, int m, int k);
    real arg, v;
    arg = 2.0 * PI_R * real'(l + 1) / real'(k * m);
    v = (1.0 - 1.94391966 * $cos(arg) + 1.41421356 * $cos(2.0 * arg) - 0.4702939 * $cos(3.0 * arg))
        / (1.0 + 2.0 * (0.97195983 + 0.70710678 + 0.23514695));
    return int'($floor(v * 16384.0 + 0.5));
  endfunction

  // (v + 2^13) >> 14, saturated to 16 bits
  function automatic int q14(longint v);
    longint r;
    r = (v + 64'sd8192) >>> 14;
    if (r > 32767) return 32767;
    if (r < -32768) return -32768;
    return int'(r);
  endfunction

endpackage
