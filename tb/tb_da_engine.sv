// tb_da_engine - self-checking test of the distributed-arithmetic engine.
//
// Two engines, synthesis mode (8 taps, M/2 phases) and analysis mode (4 taps,
// M phases), get random samples (full 16-bit range, including -32768) and
// random phases. Each result must equal sum_t c[phase][t] * x[t] exactly,
// with the coefficients taken from the prototype formula, and done must come
// exactly DW+1 clocks after start.
module tb_da_engine;
  import fbmc_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 256;
  localparam int K = 4;
  localparam int NRUN = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy_s, done_s, busy_a, done_a;
  logic [6:0] ph_s;
  logic [7:0] ph_a;
  sample_t xs [2*K], xa [K];
  logic signed [DW+CW+3:0] ys, ya;

  da_engine #(.MODE(PPN_SFB), .M(M), .K(K)) dut_s (
    .clk, .rst_n, .start, .phase(ph_s), .x(xs), .busy(busy_s), .done(done_s), .y(ys));
  da_engine #(.MODE(PPN_AFB), .M(M), .K(K)) dut_a (
    .clk, .rst_n, .start, .phase(ph_a), .x(xa), .busy(busy_a), .done(done_a), .y(ya));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t rnd_sample(int i);
    case (i % 7)
      0: return sample_t'(16'sh8000);
      1: return sample_t'(16'sh7fff);
      default: return sample_t'($urandom);
    endcase
  endfunction

  initial begin
    longint es, ea;
    int lat;
    start = 0; ph_s = 0; ph_a = 0;
    for (int t = 0; t < 2 * K; t++) xs[t] = '0;
    for (int t = 0; t < K; t++) xa[t] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NRUN; r++) begin
      @(negedge clk);
      ph_s = 7'($urandom);
      ph_a = 8'($urandom);
      es = 0; ea = 0;
      for (int t = 0; t < 2 * K; t++) begin
        xs[t] = rnd_sample(r + t);
        es += longint'(proto(int'(ph_s) + t * M / 2, M, K)) * longint'(xs[t]);
      end
      for (int t = 0; t < K; t++) begin
        xa[t] = rnd_sample(r + 3 * t);
        ea += longint'(proto(int'(ph_a) + t * M, M, K)) * longint'(xa[t]);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done_s) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != DW + 1) begin failures++; $display("latency %0d, want %0d", lat, DW + 1); end
      if (!done_a) begin failures++; $display("analysis engine not done"); end
      if (longint'(ys) != es) begin
        failures++;
        if (failures < 10) $display("synthesis phase %0d: got %0d want %0d", ph_s, ys, es);
      end
      checks++;
      if (longint'(ya) != ea) begin
        failures++;
        if (failures < 10) $display("analysis phase %0d: got %0d want %0d", ph_a, ya, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
