// tb_rx_reorder - self-checking test of the block reversal memory.
//
// Six blocks of M random values stream in with a random s_valid; each block
// must come out in reverse order with a random m_ready. Also checks that the
// memory takes a second block while the first is still being read.
module tb_rx_reorder;
  import fbmc_pkg::*;

  localparam int M  = 16;
  localparam int NB = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  s_valid, s_ready, m_valid, m_ready;
  cplx_t s_data, m_data;

  rx_reorder #(.M(M)) dut (.*);

  cplx_t blk [NB][M];
  int nout = 0, overlap = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < M; i++) blk[b][i] = cplx_t'($urandom);
    s_valid = 0;
    s_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) @(negedge clk);
        s_valid = 1;
        s_data  = blk[b][i];
        @(posedge clk);
        while (!s_ready) @(posedge clk);
        #1 s_valid = 0;
      end
  end

  always @(negedge clk) m_ready <= ($urandom_range(2) != 0);

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready && m_valid) overlap++;
    if (m_valid && m_ready) begin
      checks++;
      if (m_data != blk[nout / M][M - 1 - nout % M]) begin
        failures++;
        $display("block %0d position %0d wrong", nout / M, nout % M);
      end
      nout++;
    end
  end

  initial begin
    wait (nout == NB * M);
    repeat (5) @(posedge clk);
    checks++;
    if (m_valid || overlap == 0) begin failures++; $display("extra output or no overlap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
