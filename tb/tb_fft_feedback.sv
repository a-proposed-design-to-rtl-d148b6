// tb_fft_feedback - self-checking test of the N = T^2 point feedback FFT/IFFT.
//
// Two processors, forward and inverse, each get three random frames of N
// points (one per clock). Every output point is compared with a
// floating-point DFT of the frame divided by N (tolerance TOL LSB), in natural
// order, with m_last on the final point. The output side is throttled by a
// random m_ready. Also checked: the first output point of each frame appears
// exactly 2T + (log2T+2) + (log2T+1) + 1 clocks after the frame's last input,
// wait_o is 0 during the second loop only and finish_o during the readout.
module tb_fft_feedback;
  import fbmc_pkg::*;

  localparam int T   = 16;
  localparam int N   = T * T;
  localparam int NF  = 3;
  localparam int TOL = 6;
  localparam int LAT = 2 * T + ($clog2(T) + 2) + ($clog2(T) + 1) + 1;

  function automatic real absr(real v); return v < 0 ? -v : v; endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;

  logic  s_valid [2], s_ready [2], m_valid [2], m_ready [2], m_last [2], wait_o [2], finish_o [2];
  cplx_t s_data [2], m_data [2];

  fft_feedback #(.T(T), .INVERSE(1'b0)) dut_f (
    .clk, .rst_n, .s_valid(s_valid[0]), .s_ready(s_ready[0]), .s_data(s_data[0]),
    .m_valid(m_valid[0]), .m_ready(m_ready[0]), .m_data(m_data[0]), .m_last(m_last[0]),
    .wait_o(wait_o[0]), .finish_o(finish_o[0]));
  fft_feedback #(.T(T), .INVERSE(1'b1)) dut_i (
    .clk, .rst_n, .s_valid(s_valid[1]), .s_ready(s_ready[1]), .s_data(s_data[1]),
    .m_valid(m_valid[1]), .m_ready(m_ready[1]), .m_data(m_data[1]), .m_last(m_last[1]),
    .wait_o(wait_o[1]), .finish_o(finish_o[1]));

  real xr [2][NF][N], xi [2][NF][N];
  real ref_r [2][NF][N], ref_i [2][NF][N];
  int  last_in_cycle [2][NF];
  int  done [2] = '{0, 0};
  int  wait_low [2] = '{0, 0};

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random test data and reference transforms
  initial begin
    for (int d = 0; d < 2; d++)
      for (int f = 0; f < NF; f++) begin
        for (int n = 0; n < N; n++) begin
          xr[d][f][n] = real'(int'($urandom_range(32767)) - 16383);
          xi[d][f][n] = real'(int'($urandom_range(32767)) - 16383);
        end
        for (int k = 0; k < N; k++) begin
          real er, ei, ang;
          er = 0;
          ei = 0;
          for (int n = 0; n < N; n++) begin
            ang = ((d != 0) ? 1.0 : -1.0) * 2.0 * PI * real'((n * k) % N) / N;
            er += xr[d][f][n] * $cos(ang) - xi[d][f][n] * $sin(ang);
            ei += xr[d][f][n] * $sin(ang) + xi[d][f][n] * $cos(ang);
          end
          ref_r[d][f][k] = er / N;
          ref_i[d][f][k] = ei / N;
        end
      end
  end

  for (genvar d = 0; d < 2; d++) begin : g_drv
    // source
    initial begin
      s_valid[d] = 0;
      s_data[d]  = '0;
      wait (rst_n);
      for (int f = 0; f < NF; f++)
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          s_valid[d] = 1;
          s_data[d]  = '{re: DW'(int'(xr[d][f][n])), im: DW'(int'(xi[d][f][n]))};
          @(posedge clk);
          while (!s_ready[d]) @(posedge clk);
          if (n == N - 1) last_in_cycle[d][f] = cycle;
          #1 s_valid[d] = 0;
        end
    end
    // sink
    int f = 0, k = 0;
    always @(negedge clk) m_ready[d] <= ($urandom_range(3) != 0);
    always @(posedge clk) if (rst_n) begin
      if (!wait_o[d]) wait_low[d]++;
      if (m_valid[d] && m_ready[d] && f < NF) begin
        checks++;
        if (absr(real'(m_data[d].re) - ref_r[d][f][k]) > TOL ||
            absr(real'(m_data[d].im) - ref_i[d][f][k]) > TOL) begin
          failures++;
          if (failures < 10) $display("dut %0d frame %0d bin %0d: got %0d,%0d want %f,%f", d, f, k,
                                      m_data[d].re, m_data[d].im, ref_r[d][f][k], ref_i[d][f][k]);
        end
        checks++;
        if (m_last[d] != (k == N - 1)) begin failures++; $display("m_last wrong at %0d", k); end
        k++;
        if (k == N) begin k = 0; f++; done[d]++; end
      end
    end
    // latency: rising edge of finish_o (= m_valid) against the last input
    logic fin_q = 0;
    int   nfin = 0;
    always @(posedge clk) begin
      fin_q <= finish_o[d];
      if (rst_n && finish_o[d] && !fin_q && nfin < NF) begin
        checks++;
        if (cycle - last_in_cycle[d][nfin] != LAT) begin
          failures++;
          $display("dut %0d frame %0d: first output %0d clocks after last input, want %0d",
                   d, nfin, cycle - last_in_cycle[d][nfin], LAT);
        end
        checks++;
        if (!m_valid[d] || wait_o[d] != 1'b1) begin failures++; $display("finish/valid/wait mismatch"); end
        nfin++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] == NF && done[1] == NF);
    repeat (5) @(posedge clk);
    for (int d = 0; d < 2; d++) begin
      // wait_o low for exactly T + LAT2 clocks per frame (second loop + drain)
      checks++;
      if (wait_low[d] != NF * (T + $clog2(T) + 1)) begin
        failures++;
        $display("dut %0d: wait low for %0d clocks, want %0d", d, wait_low[d], NF * (T + $clog2(T) + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
