// fft_feedback - N-point FFT / IFFT from one T-point core used twice (N = T^2).
//
// The input frame (N points, natural order, one per clock) is split by the
// order block into T groups of T points x[k + T*m]. In the first loop each
// group goes through the T-point core and the twiddle multiplier (W_N^(r*k))
// into the register block; the register is then fed back to the order block,
// and in the second loop the same strided groups go through the core and
// straight into the register. The register then delivers X[0..N-1] in natural
// order, one point per clock. This is the structure of the source design
// (order, 16-point radix-2 core, multiplier, register, wait and finish).
//   output = (1/N) * sum_n x[n] * exp(-/+ j*2*pi*n*k/N), + for INVERSE=1
// The 1/N scaling (1/2 in every butterfly) and the sequential frame handling
// are this design's choices.
// Latency of a frame: N load clocks, then 2*T + LAT1 + LAT2 clocks
// (LAT1 = log2(T)+2, LAT2 = log2(T)+1) before the first output point.
module fft_feedback
  import fbmc_pkg::*;
#(
  parameter int   T       = 16,
  parameter logic INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  cplx_t s_data,
  output logic  m_valid,
  input  logic  m_ready,
  output cplx_t m_data,
  output logic  m_last,
  output logic  wait_o,
  output logic  finish_o
);

  localparam int N    = T * T;
  localparam int GW   = $clog2(T);
  localparam int LAT1 = GW + 2;   // core + multiplier + register write
  localparam int LAT2 = GW + 1;   // core + register write

  cplx_t          fb_data   [N];
  logic           grp_valid;
  logic [GW-1:0]  grp_tag;
  cplx_t          grp_data  [T];
  logic           core_valid;
  logic [GW-1:0]  core_tag;
  cplx_t          core_data [T];
  logic           mul_valid;
  logic [GW-1:0]  mul_tag;
  cplx_t          mul_data  [T];
  logic           wr_valid;
  logic [GW-1:0]  wr_group;
  cplx_t          wr_data   [T];
  logic           unload_done;

  fft_order #(.N(N), .T(T), .LAT1(LAT1), .LAT2(LAT2)) u_order (
    .clk, .rst_n, .s_valid, .s_ready, .s_data, .fb_data,
    .grp_valid, .grp_tag, .grp_data, .wait_o, .finish_o, .unload_done
  );

  fft_core #(.T(T), .TAGW(GW)) u_core (
    .clk, .rst_n, .inverse(INVERSE),
    .in_valid(grp_valid), .in_tag(grp_tag), .in_data(grp_data),
    .out_valid(core_valid), .out_tag(core_tag), .out_data(core_data)
  );

  twiddle_mult #(.N(N), .T(T)) u_twiddle (
    .clk, .rst_n, .inverse(INVERSE),
    .in_valid(core_valid && wait_o), .in_group(core_tag), .in_data(core_data),
    .out_valid(mul_valid), .out_group(mul_tag), .out_data(mul_data)
  );

  // wait = 1: first loop, through the multiplier; wait = 0: bypass
  assign wr_valid = wait_o ? mul_valid : core_valid;
  assign wr_group = wait_o ? mul_tag   : core_tag;
  assign wr_data  = wait_o ? mul_data  : core_data;

  fft_register #(.N(N), .T(T)) u_register (
    .clk, .rst_n, .wr_valid, .wr_group, .wr_data, .fb_data,
    .finish(finish_o), .m_valid, .m_ready, .m_data, .m_last, .unload_done
  );

endmodule
