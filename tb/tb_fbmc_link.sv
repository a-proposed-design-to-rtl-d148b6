// tb_fbmc_link - transmitter and receiver back to back, checked symbol by symbol.
//
// The same test runs with a 4-point core (M = 16) and with an 8-point core
// (M = 64), one generate scope per size; tb_fbmc_top covers M = 256.
//
// fbmc_tx output is wired straight into fbmc_rx (ideal channel). NSYM random
// 4-QAM symbols of amplitude A per subcarrier are sent, followed by K zero
// symbols that flush the filter tails. Every recovered symbol must equal
// G*c within 10 % of G*A, where G = sum_l p[l]^2 / M^2 is the end-to-end gain
// (IFFT 1/M, prototype twice, FFT 1/M) worked out here from the prototype
// formula. The receiver output is throttled by a random ready, and the link
// itself stalls the transmitter whenever the receiver is busy filtering.
module tb_fbmc_link;
  import fbmc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int T = (g == 0) ? 4 : 8;
    int   checks, failures;
    logic finished;

    localparam int M    = T * T;
    localparam int K    = 4;
    localparam int NSYM = 12;
    localparam int A    = 16000;

    function automatic real absr(real v); return v < 0 ? -v : v; endfunction

    initial begin
      checks   = 0;
      failures = 0;
      finished = 0;
    end

    logic  tx_s_valid, tx_s_ready, link_valid, link_ready, rx_m_valid, rx_m_ready;
    logic  tw, tf, rw, rf;
    cplx_t tx_s_data, link_data, rx_m_data;

    fbmc_tx #(.T(T), .K(K)) u_tx (
      .clk, .rst_n, .s_valid(tx_s_valid), .s_ready(tx_s_ready), .s_data(tx_s_data),
      .m_valid(link_valid), .m_ready(link_ready), .m_data(link_data),
      .ifft_wait(tw), .ifft_finish(tf));
    fbmc_rx #(.T(T), .K(K)) u_rx (
      .clk, .rst_n, .s_valid(link_valid), .s_ready(link_ready), .s_data(link_data),
      .m_valid(rx_m_valid), .m_ready(rx_m_ready), .m_data(rx_m_data),
      .fft_wait(rw), .fft_finish(rf));

    int  sym_re [NSYM + K][M], sym_im [NSYM + K][M];
    real gain;
    int  nrx = 0, stalls = 0;
    real maxerr = 0;


    initial begin
      real s;
      s = 0;
      for (int l = 0; l < K * M; l++) begin
        real v, arg;
        arg = 2.0 * PI * real'(l + 1) / real'(K * M);
        v = (1.0 - 1.94391966 * $cos(arg) + 1.41421356 * $cos(2.0 * arg) - 0.4702939 * $cos(3.0 * arg))
            / (1.0 + 2.0 * (0.97195983 + 0.70710678 + 0.23514695));
        s += v * v;
      end
      gain = s / real'(M) / real'(M);
      for (int n = 0; n < NSYM + K; n++)
        for (int k = 0; k < M; k++) begin
          sym_re[n][k] = (n >= NSYM) ? 0 : (($urandom_range(1) != 0) ? A : -A);
          sym_im[n][k] = (n >= NSYM) ? 0 : (($urandom_range(1) != 0) ? A : -A);
        end
    end

    // source
    initial begin
      tx_s_valid = 0;
      tx_s_data  = '0;
      wait (rst_n);
      for (int n = 0; n < NSYM + K; n++)
        for (int k = 0; k < M; k++) begin
          @(negedge clk);
          tx_s_valid = 1;
          tx_s_data  = '{re: DW'(sym_re[n][k]), im: DW'(sym_im[n][k])};
          @(posedge clk);
          while (!tx_s_ready) @(posedge clk);
          #1 tx_s_valid = 0;
        end
    end

    always @(negedge clk) rx_m_ready <= ($urandom_range(3) != 0);
    always @(posedge clk) if (rst_n && link_valid && !link_ready) stalls++;

    // sink
    always @(posedge clk) if (rst_n && rx_m_valid && rx_m_ready) begin
      automatic int n = nrx / M, k = nrx % M;
      if (n < NSYM) begin
        real er, ei;
        er = real'(rx_m_data.re) - gain * sym_re[n][k];
        ei = real'(rx_m_data.im) - gain * sym_im[n][k];
        if (absr(er) > maxerr) maxerr = absr(er);
        if (absr(ei) > maxerr) maxerr = absr(ei);
        checks++;
        if (absr(er) > 0.1 * gain * A || absr(ei) > 0.1 * gain * A) begin
          failures++;
          if (failures < 10) $display("symbol %0d subcarrier %0d: got %f,%f want %f,%f", n, k,
              real'(rx_m_data.re), real'(rx_m_data.im), gain * sym_re[n][k], gain * sym_im[n][k]);
        end
      end
      nrx++;
    end

    initial begin
      wait (rst_n);
      wait (nrx == NSYM * M);
      repeat (10) @(posedge clk);
      checks++;
      if (stalls == 0) begin failures++; $display("transmitter never stalled"); end
      $display("M=%0d: expected amplitude %f, largest error %f, link stalls %0d", M, gain * A, maxerr, stalls);
      finished = 1;
    end
  end

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", g_size[0].checks + g_size[1].checks, g_size[0].failures + g_size[1].failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (g_size[0].finished && g_size[1].finished);
    $display("TB_RESULT checks=%0d failures=%0d", g_size[0].checks + g_size[1].checks, g_size[0].failures + g_size[1].failures);
    $finish;
  end
endmodule
