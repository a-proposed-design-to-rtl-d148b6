// fbmc_rx - FBMC receiver: DA analysis filter bank, block reversal, feedback
// FFT, FIFO, OQAM demodulation.
//
// Received samples (valid/ready) enter the polyphase analysis filter, which
// for every M/2 samples emits M folded products with its sub-filters in
// reverse order. rx_reorder flips each block back so the FFT sees the first
// bin first; a one-clock register stage (the Delay of the source design's
// receiver) sits in front of the FFT. The FFT (M = T^2 points from a T-point
// core) scales by 1/M, a FIFO turns its frames into a sample stream, and
// oqam_demod joins two half-symbol frames into one complex symbol per
// subcarrier. The chain follows the source design's receiver, with the OQAM
// post-processing added at its end.
module fbmc_rx
  import fbmc_pkg::*;
#(
  parameter int T          = 16,
  parameter int K          = 4,
  parameter int FIFO_DEPTH = T * T
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  cplx_t s_data,
  output logic  m_valid,
  input  logic  m_ready,
  output cplx_t m_data,
  output logic  fft_wait,
  output logic  fft_finish
);

  localparam int M = T * T;

  logic  af_valid, af_ready;
  cplx_t af_data;
  logic  ro_valid, ro_ready;
  cplx_t ro_data;
  logic  d_valid, d_ready;
  cplx_t d_data;
  logic  ff_valid, ff_ready, ff_last;
  cplx_t ff_data;
  logic  q_valid, q_ready;
  logic [2*DW-1:0] q_data;

  afb_ppn #(.M(M), .K(K)) u_afb (
    .clk, .rst_n, .s_valid, .s_ready, .s_data,
    .m_valid(af_valid), .m_ready(af_ready), .m_data(af_data)
  );

  rx_reorder #(.M(M)) u_reorder (
    .clk, .rst_n, .s_valid(af_valid), .s_ready(af_ready), .s_data(af_data),
    .m_valid(ro_valid), .m_ready(ro_ready), .m_data(ro_data)
  );

  // one-word register slice (the z^-1 in front of the FFT)
  assign ro_ready = !d_valid || d_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        d_valid <= 1'b0;
    else if (ro_ready) d_valid <= ro_valid;
  end
  always_ff @(posedge clk) if (ro_ready && ro_valid) d_data <= ro_data;

  fft_feedback #(.T(T), .INVERSE(1'b0)) u_fft (
    .clk, .rst_n, .s_valid(d_valid), .s_ready(d_ready), .s_data(d_data),
    .m_valid(ff_valid), .m_ready(ff_ready), .m_data(ff_data), .m_last(ff_last),
    .wait_o(fft_wait), .finish_o(fft_finish)
  );

  axis_fifo #(.WIDTH(2 * DW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .s_tvalid(ff_valid), .s_tready(ff_ready), .s_tdata(ff_data),
    .m_tvalid(q_valid), .m_tready(q_ready), .m_tdata(q_data)
  );

  oqam_demod #(.M(M)) u_demod (
    .clk, .rst_n, .s_valid(q_valid), .s_ready(q_ready), .s_data(cplx_t'(q_data)),
    .m_valid, .m_ready, .m_data
  );

endmodule
