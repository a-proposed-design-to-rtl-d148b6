// fbmc_tx - FBMC transmitter: OQAM modulation, feedback IFFT, FIFO, DA
// synthesis filter bank.
//
// Symbols c_k (one complex value per subcarrier, k = 0..M-1, valid/ready)
// are split by oqam_mod into two half-symbol frames, each turned into M time
// values by the M-point IFFT built from a T-point core (M = T^2). A FIFO
// decouples the frame-wise IFFT output from the polyphase synthesis filter,
// which emits M/2 transmit samples per half-symbol frame, i.e. M samples per
// symbol. The chain of blocks follows the source design's transmitter; every
// link is a valid/ready stream of cplx_t, so backpressure from m_ready stalls
// the whole chain. The IFFT scales by 1/M; overall gain from a symbol to the
// samples is set by that and the Q1.14 prototype (peak 1.0).
module fbmc_tx
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
  output logic  ifft_wait,
  output logic  ifft_finish
);

  localparam int M = T * T;

  logic  oq_valid, oq_ready;
  cplx_t oq_data;
  logic  ff_valid, ff_ready, ff_last;
  cplx_t ff_data;
  logic  q_valid, q_ready;
  logic [2*DW-1:0] q_data;

  oqam_mod #(.M(M)) u_oqam (
    .clk, .rst_n, .s_valid, .s_ready, .s_data,
    .m_valid(oq_valid), .m_ready(oq_ready), .m_data(oq_data)
  );

  fft_feedback #(.T(T), .INVERSE(1'b1)) u_ifft (
    .clk, .rst_n, .s_valid(oq_valid), .s_ready(oq_ready), .s_data(oq_data),
    .m_valid(ff_valid), .m_ready(ff_ready), .m_data(ff_data), .m_last(ff_last),
    .wait_o(ifft_wait), .finish_o(ifft_finish)
  );

  axis_fifo #(.WIDTH(2 * DW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .s_tvalid(ff_valid), .s_tready(ff_ready), .s_tdata(ff_data),
    .m_tvalid(q_valid), .m_tready(q_ready), .m_tdata(q_data)
  );

  sfb_ppn #(.M(M), .K(K)) u_sfb (
    .clk, .rst_n, .s_valid(q_valid), .s_ready(q_ready), .s_data(cplx_t'(q_data)),
    .m_valid, .m_ready, .m_data
  );

endmodule
