// tb_fbmc_top - end-to-end test of the transceiver at its default size.
//
// fbmc_top with M = 256 subcarriers (16-point FFT core), K = 4. The
// transmitter output is looped back into the receiver input. NSYM random
// 4-QAM symbols per subcarrier are sent, then K zero symbols to flush the
// filters; every recovered symbol must equal G*c within 10 % of G*A, with
// G = sum_l p[l]^2 / M^2 worked out here from the prototype formula. The test
// also counts the mechanisms of the design and fails if one never happened:
// second FFT loop (wait = 0) and result readout (finish = 1) in both FFT
// processors, transmitter stalled by the receiver, receiver output held by
// the sink.
module tb_fbmc_top;
  import fbmc_pkg::*;

  localparam int M    = 256;
  localparam int K    = 4;
  localparam int NSYM = 3;
  localparam int A    = 16000;

  function automatic real absr(real v); return v < 0 ? -v : v; endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic  tx_in_valid, tx_in_ready, tx_out_valid, tx_out_ready;
  logic  rx_in_valid, rx_in_ready, rx_out_valid, rx_out_ready;
  cplx_t tx_in_data, tx_out_data, rx_in_data, rx_out_data;
  logic  tx_ifft_wait, tx_ifft_finish, rx_fft_wait, rx_fft_finish;

  fbmc_top dut (.*);

  // ideal channel
  assign rx_in_valid  = tx_out_valid;
  assign rx_in_data   = tx_out_data;
  assign tx_out_ready = rx_in_ready;

  int  sym_re [NSYM + K][M], sym_im [NSYM + K][M];
  real gain, maxerr = 0;
  int  nrx = 0;
  int  n_tx_loop2 = 0, n_rx_loop2 = 0, n_tx_finish = 0, n_rx_finish = 0;
  int  n_link_stall = 0, n_out_hold = 0;
  logic tw_q = 1, rw_q = 1, tf_q = 0, rf_q = 0;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired after %0d symbols", nrx / M);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  initial begin
    tx_in_valid = 0;
    tx_in_data  = '0;
    wait (rst_n);
    for (int n = 0; n < NSYM + K; n++)
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        tx_in_valid = 1;
        tx_in_data  = '{re: DW'(sym_re[n][k]), im: DW'(sym_im[n][k])};
        @(posedge clk);
        while (!tx_in_ready) @(posedge clk);
        #1 tx_in_valid = 0;
      end
  end

  always @(negedge clk) rx_out_ready <= ($urandom_range(3) != 0);

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    tw_q <= tx_ifft_wait;   rw_q <= rx_fft_wait;
    tf_q <= tx_ifft_finish; rf_q <= rx_fft_finish;
    if (tw_q && !tx_ifft_wait)    n_tx_loop2++;
    if (rw_q && !rx_fft_wait)     n_rx_loop2++;
    if (!tf_q && tx_ifft_finish)  n_tx_finish++;
    if (!rf_q && rx_fft_finish)   n_rx_finish++;
    if (tx_out_valid && !tx_out_ready) n_link_stall++;
    if (rx_out_valid && !rx_out_ready) n_out_hold++;
  end

  always @(posedge clk) if (rst_n && rx_out_valid && rx_out_ready) begin
    automatic int n = nrx / M, k = nrx % M;
    if (n < NSYM) begin
      real er, ei;
      er = real'(rx_out_data.re) - gain * sym_re[n][k];
      ei = real'(rx_out_data.im) - gain * sym_im[n][k];
      if (absr(er) > maxerr) maxerr = absr(er);
      if (absr(ei) > maxerr) maxerr = absr(ei);
      checks++;
      if (absr(er) > 0.1 * gain * A || absr(ei) > 0.1 * gain * A) begin
        failures++;
        if (failures < 10) $display("symbol %0d subcarrier %0d: got %f,%f want %f,%f", n, k,
            real'(rx_out_data.re), real'(rx_out_data.im), gain * sym_re[n][k], gain * sym_im[n][k]);
      end
    end
    nrx++;
  end

  task automatic need(string what, int count);
    checks++;
    $display("%s: %0d", what, count);
    if (count == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nrx == NSYM * M);
    repeat (10) @(posedge clk);
    $display("expected amplitude %f, largest error %f", gain * A, maxerr);
    need("transmit IFFT second loops (wait=0)", n_tx_loop2);
    need("receive FFT second loops (wait=0)", n_rx_loop2);
    need("transmit IFFT readouts (finish=1)", n_tx_finish);
    need("receive FFT readouts (finish=1)", n_rx_finish);
    need("clocks transmitter stalled by receiver", n_link_stall);
    need("clocks receiver output held by sink", n_out_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
