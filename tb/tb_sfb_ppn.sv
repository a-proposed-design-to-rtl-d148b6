// tb_sfb_ppn - self-checking test of the synthesis polyphase network.
//
// The same test runs at the default size M = 256 (L = 1024) and at the small
// DA filter size M = 8, K = 4 (L = 32), one generate scope per size.
//
// NF random frames of M complex values go in; each of the M/2 samples that
// follow a frame must equal, bit for bit,
//   round(sum_{q<=f, q<2K} p[i + q*M/2] * y_(f-q)[(i + q*M/2 + 1) mod M] / 2^14)
// computed here from the prototype formula. The output is throttled by a
// random m_ready, and the number of clocks from a frame's last input to its
// first output (DW + 3) is checked.
module tb_sfb_ppn;
  import fbmc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int M = (g == 0) ? 256 : 8;
    int   checks, failures;
    logic finished;

    localparam int K  = 4;
    localparam int H  = M / 2;
    localparam int NF = 11;

    int cycle = 0;
    always @(posedge clk) cycle <= cycle + 1;

    logic  s_valid, s_ready, m_valid, m_ready;
    cplx_t s_data, m_data;

    sfb_ppn #(.M(M), .K(K)) dut (.*);

    int yr [NF][M], yi [NF][M];
    int nout = 0;
    int last_in [NF];
    bit first_seen [NF];

    initial begin
      checks   = 0;
      failures = 0;
      finished = 0;
      for (int f = 0; f < NF; f++)
        for (int j = 0; j < M; j++) begin
          yr[f][j] = int'($urandom_range(40000)) - 20000;
          yi[f][j] = int'($urandom_range(40000)) - 20000;
        end
      for (int f = 0; f < NF; f++) first_seen[f] = 0;
    end

    initial begin
      s_valid = 0;
      s_data  = '0;
      wait (rst_n);
      for (int f = 0; f < NF; f++)
        for (int j = 0; j < M; j++) begin
          @(negedge clk);
          s_valid = 1;
          s_data  = '{re: DW'(yr[f][j]), im: DW'(yi[f][j])};
          @(posedge clk);
          while (!s_ready) @(posedge clk);
          if (j == M - 1) last_in[f] = cycle;
          #1 s_valid = 0;
        end
    end

    always @(negedge clk) m_ready <= ($urandom_range(3) != 0);

    always @(posedge clk) if (rst_n && m_valid) begin
      automatic int f = nout / H, i = nout % H;
      if (!first_seen[f]) begin
        first_seen[f] = 1;
        checks++;
        if (cycle - last_in[f] != DW + 3) begin
          failures++;
          $display("frame %0d: first output %0d clocks after input, want %0d", f, cycle - last_in[f], DW + 3);
        end
      end
      if (m_ready) begin
        longint er, ei;
        er = 0; ei = 0;
        for (int q = 0; q < 2 * K; q++)
          if (q <= f) begin
            er += longint'(proto(i + q * H, M, K)) * yr[f-q][(i + q * H + 1) % M];
            ei += longint'(proto(i + q * H, M, K)) * yi[f-q][(i + q * H + 1) % M];
          end
        checks++;
        if (int'(m_data.re) != q14(er) || real'(m_data.im) != real'(q14(ei))) begin
          failures++;
          if (failures < 10) $display("frame %0d sample %0d: got %0d,%f want %0d,%0d", f, i,
                                      m_data.re, real'(m_data.im), q14(er), q14(ei));
        end
        nout++;
      end
    end

    initial begin
      wait (rst_n);
      wait (nout == NF * H);
      repeat (30) @(posedge clk);
      checks++;
      if (m_valid) begin failures++; $display("M=%0d: output beyond the last frame", M); end
      $display("M=%0d: %0d samples checked", M, nout);
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
