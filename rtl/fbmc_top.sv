// fbmc_top - FBMC transceiver: transmitter and receiver side by side.
//
// The transmitter turns complex symbols (M subcarriers, serial) into baseband
// samples; the receiver turns baseband samples back into symbols. The channel
// between them is outside this design, so the transmitter output and the
// receiver input are separate ports; connecting tx_out to rx_in gives a
// back-to-back link. Every port group is a valid/ready stream of complex
// samples with DW-bit real and imaginary parts. M = T^2 subcarriers
// (256 with T = 16), overlap factor K = 4, prototype length L = K*M, as in
// the source design's main configuration. The wait/finish control signals
// of both FFT processors are brought out for observation.
module fbmc_top
  import fbmc_pkg::*;
#(
  parameter int T = 16,
  parameter int K = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // transmitter: symbols in, samples out
  input  logic  tx_in_valid,
  output logic  tx_in_ready,
  input  cplx_t tx_in_data,
  output logic  tx_out_valid,
  input  logic  tx_out_ready,
  output cplx_t tx_out_data,
  // receiver: samples in, symbols out
  input  logic  rx_in_valid,
  output logic  rx_in_ready,
  input  cplx_t rx_in_data,
  output logic  rx_out_valid,
  input  logic  rx_out_ready,
  output cplx_t rx_out_data,
  // FFT control signals
  output logic  tx_ifft_wait,
  output logic  tx_ifft_finish,
  output logic  rx_fft_wait,
  output logic  rx_fft_finish
);

  fbmc_tx #(.T(T), .K(K)) u_tx (
    .clk, .rst_n,
    .s_valid(tx_in_valid), .s_ready(tx_in_ready), .s_data(tx_in_data),
    .m_valid(tx_out_valid), .m_ready(tx_out_ready), .m_data(tx_out_data),
    .ifft_wait(tx_ifft_wait), .ifft_finish(tx_ifft_finish)
  );

  fbmc_rx #(.T(T), .K(K)) u_rx (
    .clk, .rst_n,
    .s_valid(rx_in_valid), .s_ready(rx_in_ready), .s_data(rx_in_data),
    .m_valid(rx_out_valid), .m_ready(rx_out_ready), .m_data(rx_out_data),
    .fft_wait(rx_fft_wait), .fft_finish(rx_fft_finish)
  );

endmodule
