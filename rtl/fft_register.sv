// fft_register - result register of the feedback FFT.
//
// Stores the T points of group g, arriving in parallel, at addresses
// g*T .. g*T+T-1 of an N-point register, and shows the whole register to the
// order block (fb_data) for the second loop. After the second loop, address
// r*T + d holds X[r + T*d]; while finish is 1 the register is read out one
// point per clock (valid/ready) at address (n mod T)*T + n/T, which gives the
// transform in natural order X[0], X[1], ... X[N-1]. m_last marks X[N-1], and
// unload_done pulses when that point is taken. The collecting register and
// its finish-controlled output follow the source design; the address pattern
// and the serial readout are this design's choices.
module fft_register
  import fbmc_pkg::*;
#(
  parameter int N = 256,
  parameter int T = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_valid,
  input  logic [$clog2(T)-1:0] wr_group,
  input  cplx_t                wr_data [T],
  output cplx_t                fb_data [N],
  input  logic                 finish,
  output logic                 m_valid,
  input  logic                 m_ready,
  output cplx_t                m_data,
  output logic                 m_last,
  output logic                 unload_done
);

  localparam int NW = $clog2(N);
  localparam int GW = $clog2(T);

  cplx_t         mem [N];
  logic [NW-1:0] n;
  logic [NW-1:0] raddr;

  always_ff @(posedge clk) begin
    if (wr_valid)
      for (int i = 0; i < T; i++) mem[{wr_group, GW'(i)}] <= wr_data[i];
  end

  assign fb_data = mem;

  // transpose of the base-T digits of n
  assign raddr       = {n[GW-1:0], n[NW-1:GW]};
  assign m_valid     = finish;
  assign m_data      = mem[raddr];
  assign m_last      = (n == NW'(N - 1));
  assign unload_done = m_valid && m_ready && m_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 n <= '0;
    else if (!finish)           n <= '0;
    else if (m_valid && m_ready) n <= n + 1'b1;
  end

endmodule
