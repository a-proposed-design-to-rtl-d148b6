// tb_oqam_mod - self-checking test of the OQAM pre-processing.
//
// Five random symbols of M subcarriers go in; 2*5 frames must come out:
// frame 2n value k = Re(c_k) * j^(k+2n), frame 2n+1 value k = Im(c_k) *
// j^(k+2n+1), worked out here from the phase rule. Output throttled by a
// random m_ready; the input must be refused during odd frames.
module tb_oqam_mod;
  import fbmc_pkg::*;

  localparam int M  = 16;
  localparam int NS = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  s_valid, s_ready, m_valid, m_ready;
  cplx_t s_data, m_data;

  oqam_mod #(.M(M)) dut (.*);

  int cre [NS][M], cim [NS][M];
  int nout = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NS; n++)
      for (int k = 0; k < M; k++) begin
        cre[n][k] = int'($urandom_range(60000)) - 30000;
        cim[n][k] = int'($urandom_range(60000)) - 30000;
      end
    s_valid = 0;
    s_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++)
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        s_valid = 1;
        s_data  = '{re: DW'(cre[n][k]), im: DW'(cim[n][k])};
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        #1 s_valid = 0;
      end
  end

  always @(negedge clk) m_ready <= ($urandom_range(3) != 0);

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    automatic int m = nout / M, k = nout % M;
    automatic int a = (m % 2 == 0) ? cre[m/2][k] : cim[m/2][k];
    automatic int wr, wi;
    case ((k + m) % 4)
      0: begin wr = a;  wi = 0;  end
      1: begin wr = 0;  wi = a;  end
      2: begin wr = -a; wi = 0;  end
      default: begin wr = 0; wi = -a; end
    endcase
    checks++;
    if (int'(m_data.re) != wr || real'(m_data.im) != real'(wi)) begin
      failures++;
      if (failures < 10) $display("frame %0d k %0d: got %0d,%f want %0d,%0d", m, k, m_data.re, real'(m_data.im), wr, wi);
    end
    checks++;
    if (m % 2 == 1 && s_ready) begin failures++; $display("input taken during odd frame"); end
    nout++;
  end

  initial begin
    wait (nout == 2 * NS * M);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
