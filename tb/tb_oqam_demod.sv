// tb_oqam_demod - self-checking test of the OQAM post-processing.
//
// Ten random frames of M complex values go in. Symbol n, subcarrier k must
// come out as d(2n) + j d(2n+1) with d(m) = Re{conj(j^(k+m)) u_m[k]}, worked
// out here. Input with random gaps, output with a random m_ready.
module tb_oqam_demod;
  import fbmc_pkg::*;

  localparam int M  = 16;
  localparam int NF = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  s_valid, s_ready, m_valid, m_ready;
  cplx_t s_data, m_data;

  oqam_demod #(.M(M)) dut (.*);

  int ur [NF][M], ui [NF][M];
  int nout = 0;

  function automatic int derot(int re, int im, int p);
    case (p % 4)
      0: return re;
      1: return im;
      2: return -re;
      default: return -im;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < M; k++) begin
        ur[f][k] = int'($urandom_range(60000)) - 30000;
        ui[f][k] = int'($urandom_range(60000)) - 30000;
      end
    s_valid = 0;
    s_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) @(negedge clk);
        s_valid = 1;
        s_data  = '{re: DW'(ur[f][k]), im: DW'(ui[f][k])};
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        #1 s_valid = 0;
      end
  end

  always @(negedge clk) m_ready <= ($urandom_range(3) != 0);

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    automatic int n = nout / M, k = nout % M;
    automatic int wr = derot(ur[2*n][k], ui[2*n][k], k + 2 * n);
    automatic int wi = derot(ur[2*n+1][k], ui[2*n+1][k], k + 2 * n + 1);
    checks++;
    if (int'(m_data.re) != wr || real'(m_data.im) != real'(wi)) begin
      failures++;
      if (failures < 10) $display("symbol %0d k %0d: got %0d,%f want %0d,%0d", n, k, m_data.re, real'(m_data.im), wr, wi);
    end
    nout++;
  end

  initial begin
    wait (nout == NF / 2 * M);
    repeat (5) @(posedge clk);
    checks++;
    if (m_valid) begin failures++; $display("extra output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
