// tb_fft_core - self-checking test of the T-point pipelined FFT core.
//
// Feeds 40 random groups back to back (one per clock), half forward and half
// inverse, and compares every output with a floating-point DFT divided by T
// (tolerance TOL LSB). Also checks that each result appears exactly log2(T)
// clocks after its input and that the tag travels with it.
module tb_fft_core;
  import fbmc_pkg::*;

  localparam int T    = 16;
  localparam int S    = $clog2(T);
  localparam int NG   = 40;
  localparam int TOL  = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            inverse, in_valid, out_valid;
  logic [5:0]      in_tag, out_tag;
  cplx_t           in_data [T], out_data [T];

  function automatic real absr(real v); return v < 0 ? -v : v; endfunction

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  real xr [NG][T], xi [NG][T];
  int  sent_cycle [NG];
  bit  inv_of [NG];

  fft_core #(.T(T), .TAGW(6)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  int got = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int g = int'(out_tag);
    for (int k = 0; k < T; k++) begin
      real er, ei, sg, ang;
      er = 0; ei = 0;
      sg = inv_of[g] ? 1.0 : -1.0;
      for (int n = 0; n < T; n++) begin
        ang = sg * 2.0 * PI * n * k / T;
        er += xr[g][n] * $cos(ang) - xi[g][n] * $sin(ang);
        ei += xr[g][n] * $sin(ang) + xi[g][n] * $cos(ang);
      end
      er /= T; ei /= T;
      checks++;
      if (absr(real'(out_data[k].re) - er) > TOL || absr(real'(out_data[k].im) - ei) > TOL) begin
        failures++;
        if (failures < 10) $display("group %0d bin %0d: got %0d,%0d want %f,%f", g, k,
                                    out_data[k].re, out_data[k].im, er, ei);
      end
    end
    checks++;
    if (cycle - sent_cycle[g] != S) begin
      failures++;
      $display("group %0d latency %0d, want %0d", g, cycle - sent_cycle[g], S);
    end
    got++;
  end

  initial begin
    in_valid = 0; inverse = 0; in_tag = 0;
    for (int n = 0; n < T; n++) in_data[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int g = 0; g < NG; g++) begin
      if (g == NG / 2) begin
        // let the forward groups leave before the direction changes
        @(negedge clk);
        in_valid = 0;
        repeat (S + 1) @(negedge clk);
      end else begin
        @(negedge clk);
      end
      inv_of[g] = (g >= NG / 2);
      inverse   = inv_of[g];
      in_valid  = 1;
      in_tag    = 6'(g);
      for (int n = 0; n < T; n++) begin
        // first group: a single impulse; otherwise random values below 2^14
        int a, b;
        a = (g == 0) ? ((n == 0) ? 16000 : 0) : ($urandom_range(32767) - 16383);
        b = (g == 0) ? 0 : ($urandom_range(32767) - 16383);
        in_data[n].re = DW'(a);
        in_data[n].im = DW'(b);
        xr[g][n] = a; xi[g][n] = b;
      end
      sent_cycle[g] = cycle;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (S + 3) @(posedge clk);
    checks++;
    if (got != NG) begin failures++; $display("received %0d groups of %0d", got, NG); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
