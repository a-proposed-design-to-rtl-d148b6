// tb_fft_register - self-checking test of the FFT result register.
//
// Writes T random groups (T points each, in a shuffled group order), checks
// that fb_data shows group g at g*T..g*T+T-1, then raises finish and reads
// the register out with a random m_ready: the n-th point must be the word
// stored at (n mod T)*T + n/T, m_last must mark point N-1 and unload_done must
// pulse exactly once, when that point is taken. Done twice.
module tb_fft_register;
  import fbmc_pkg::*;

  localparam int N = 256;
  localparam int T = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       wr_valid, finish, m_valid, m_ready, m_last, unload_done;
  logic [3:0] wr_group;
  cplx_t      wr_data [T], fb_data [N], m_data;
  cplx_t      mdl [N];

  fft_register #(.N(N), .T(T)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [T];
    int n, ndone;
    wr_valid = 0; wr_group = 0; finish = 0; m_ready = 0;
    for (int i = 0; i < T; i++) wr_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int g = 0; g < T; g++) order[g] = (g * 7 + rep) % T;
      for (int g = 0; g < T; g++) begin
        @(negedge clk);
        wr_valid = 1;
        wr_group = 4'(order[g]);
        for (int i = 0; i < T; i++) begin
          wr_data[i] = cplx_t'($urandom);
          mdl[order[g] * T + i] = wr_data[i];
        end
      end
      @(negedge clk);
      wr_valid = 0;
      for (int a = 0; a < N; a++) begin
        checks++;
        if (fb_data[a] != mdl[a]) begin failures++; $display("fb_data[%0d] wrong", a); end
      end
      checks++;
      if (m_valid) begin failures++; $display("m_valid without finish"); end
      finish = 1;
      n = 0; ndone = 0;
      while (n < N) begin
        m_ready = ($urandom_range(2) != 0);
        @(posedge clk);
        if (unload_done) ndone++;
        if (m_valid && m_ready) begin
          checks += 2;
          if (m_data != mdl[(n % T) * T + n / T]) begin
            failures++;
            if (failures < 10) $display("output %0d wrong", n);
          end
          if (m_last != (n == N - 1)) begin failures++; $display("m_last wrong at %0d", n); end
          n++;
        end
        @(negedge clk);
      end
      finish = 0;
      m_ready = 0;
      checks++;
      if (ndone != 1) begin failures++; $display("unload_done pulsed %0d times", ndone); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
