// tb_afb_ppn - self-checking test of the analysis polyphase network.
//
// L + 3*M/2 random samples go in (L = K*M), which completes exactly four
// analysis frames. Frame m must come out as M values in the order
// j = M-1 down to 0, each bit for bit equal to
//   round(sum_{q<K} p[jj + q*M] * r[m*M/2 + jj + q*M] / 2^14),  jj = (j-1) mod M
// computed here from the prototype formula; no frame may appear early or
// beyond the fourth. The output is throttled by a random m_ready.
module tb_afb_ppn;
  import fbmc_pkg::*;
  import tb_ref_pkg::*;

  localparam int M  = 256;
  localparam int K  = 4;
  localparam int H  = M / 2;
  localparam int NS = K * M + 3 * H;
  localparam int NFR = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  s_valid, s_ready, m_valid, m_ready;
  cplx_t s_data, m_data;

  afb_ppn #(.M(M), .K(K)) dut (.*);

  int rr [NS], ri [NS];
  int nin = 0, nout = 0;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      rr[n] = int'($urandom_range(40000)) - 20000;
      ri[n] = int'($urandom_range(40000)) - 20000;
    end
  end

  initial begin
    s_valid = 0;
    s_data  = '0;
    wait (rst_n);
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      s_valid = 1;
      s_data  = '{re: DW'(rr[n]), im: DW'(ri[n])};
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      nin++;
      #1 s_valid = 0;
    end
  end

  always @(negedge clk) m_ready <= ($urandom_range(3) != 0);

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    automatic int m = nout / M, j = M - 1 - (nout % M);
    automatic int jj = (j + M - 1) % M;
    longint er, ei;
    er = 0; ei = 0;
    checks++;
    // a frame may only appear once its whole window has arrived
    if (nin < m * H + K * M) begin failures++; $display("frame %0d too early", m); end
    if (m < NFR) begin
      for (int q = 0; q < K; q++) begin
        er += longint'(proto(jj + q * M, M, K)) * rr[m * H + jj + q * M];
        ei += longint'(proto(jj + q * M, M, K)) * ri[m * H + jj + q * M];
      end
      checks++;
      if (int'(m_data.re) != q14(er) || real'(m_data.im) != real'(q14(ei))) begin
        failures++;
        if (failures < 10) $display("frame %0d j %0d: got %0d,%f want %0d,%0d", m, j,
                                    m_data.re, real'(m_data.im), q14(er), q14(ei));
      end
    end
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout == NFR * M);
    repeat (100) @(posedge clk);
    checks++;
    if (m_valid || nout != NFR * M) begin failures++; $display("output beyond the fourth frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
