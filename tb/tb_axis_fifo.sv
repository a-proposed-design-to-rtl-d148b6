// tb_axis_fifo - self-checking test of the stream FIFO.
//
// Random writes and reads with random tvalid/tready for 5000 clocks against a
// queue model: every word read must be the oldest one written, s_tready must
// be low exactly when DEPTH words are held and m_tvalid exactly when none is.
module tb_axis_fifo;
  localparam int WIDTH = 32;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             s_tvalid, s_tready, m_tvalid, m_tready;
  logic [WIDTH-1:0] s_tdata, m_tdata;

  axis_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] q [$];
  int n_full = 0, n_empty = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_tvalid = 0; m_tready = 0; s_tdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      // phases: mostly writing, mostly reading, balanced
      s_tvalid = ($urandom_range(9) < (((c / 500) % 2 != 0) ? 3 : 8));
      m_tready = ($urandom_range(9) < (((c / 500) % 2 != 0) ? 8 : 3));
      s_tdata  = $urandom;
      @(posedge clk);
      checks++;
      if (s_tready != (q.size() < DEPTH) || m_tvalid != (q.size() > 0)) begin
        failures++;
        $display("flags wrong at %0d: ready %0b valid %0b size %0d", c, s_tready, m_tvalid, q.size());
      end
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      if (m_tvalid && m_tready) begin
        checks++;
        if (m_tdata != q[0]) begin failures++; $display("data wrong at %0d", c); end
        void'(q.pop_front());
      end
      if (s_tvalid && s_tready) q.push_back(s_tdata);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full or empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
