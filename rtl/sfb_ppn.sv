// sfb_ppn - synthesis polyphase network (transmit filter bank) with DA filters.
//
// Takes IFFT output frames y_m (M complex values each, one per clock,
// valid/ready) and produces M/2 transmit samples per frame:
//   s[m*M/2 + i] = sum_{q=0}^{2K-1} p[i + q*M/2] * y_(m-q)[(i + q*M/2 + 1) mod M]
// for i = 0..M/2-1. This is the bank of M prototype sub-filters, upsampled by
// M/2, delayed and summed, written as one inner product per output sample.
// The last 2K frames are kept in 2K banks of M words (one bank per frame, so
// the 2K taps of a sample are read in one clock); frames before the first
// one count as zero. Each inner product is formed by two DA engines (real
// and imaginary parts; the coefficients are real), then rounded from Q1.14
// and saturated to DW bits. The "+1" in the frame index puts the phase
// reference of every subcarrier at the centre of the prototype, which the
// OQAM real-orthogonality needs.
// NT = 2K and M must be powers of two (bank and word indices wrap).
// Timing: a frame is loaded in M clocks, then each output sample takes
// DW + 3 clocks (read, DA bits, result) plus any wait for m_ready; no input is
// accepted while the M/2 samples are computed.
// The sub-filter structure and DA filtering follow the source design; the
// memory organisation and sequencing are this design's choices.
module sfb_ppn
  import fbmc_pkg::*;
#(
  parameter int M = 256,
  parameter int K = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  cplx_t s_data,
  output logic  m_valid,
  input  logic  m_ready,
  output cplx_t m_data
);

  localparam int NT = 2 * K;
  localparam int H  = M / 2;
  localparam int AW = $clog2(M);
  localparam int SW = $clog2(NT);
  localparam int PW = $clog2(H);
  localparam int ACCW = DW + CW + 4;

  typedef enum logic [1:0] {LOAD, START, BUSY, OUT} state_e;

  state_e        state;
  cplx_t         hist [NT][M];
  logic [SW-1:0] wslot;          // bank of the newest frame
  logic [AW-1:0] waddr;
  logic [SW:0]   nfr;            // frames stored, saturates at NT
  logic [PW-1:0] i_cnt;          // output sample within the frame

  sample_t       x_re [NT];
  sample_t       x_im [NT];
  logic          busy_re, busy_im, done_re, done_im;
  logic signed [ACCW-1:0] y_re, y_im;

  assign s_ready = (state == LOAD);
  assign m_valid = (state == OUT);

  // tap q: frame m-q (bank wslot-q), word (i + q*M/2 + 1) mod M
  for (genvar q = 0; q < NT; q++) begin : g_tap
    logic [SW-1:0] slot;
    logic [AW-1:0] addr;
    assign slot    = wslot - SW'(q);
    assign addr    = AW'(i_cnt) + AW'(q * H + 1);
    assign x_re[q] = ((SW+1)'(q) < nfr) ? hist[slot][addr].re : '0;
    assign x_im[q] = ((SW+1)'(q) < nfr) ? hist[slot][addr].im : '0;
  end

  da_engine #(.MODE(PPN_SFB), .M(M), .K(K)) u_da_re (
    .clk, .rst_n, .start(state == START), .phase(i_cnt), .x(x_re),
    .busy(busy_re), .done(done_re), .y(y_re)
  );
  da_engine #(.MODE(PPN_SFB), .M(M), .K(K)) u_da_im (
    .clk, .rst_n, .start(state == START), .phase(i_cnt), .x(x_im),
    .busy(busy_im), .done(done_im), .y(y_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= LOAD;
      wslot  <= '0;
      waddr  <= '0;
      nfr    <= '0;
      i_cnt  <= '0;
      m_data <= '0;
    end else begin
      unique case (state)
        LOAD:  if (s_valid) begin
                 waddr <= waddr + 1'b1;
                 if (waddr == AW'(M - 1)) begin
                   state <= START;
                   i_cnt <= '0;
                   if (nfr != (SW+1)'(NT)) nfr <= nfr + 1'b1;
                 end
               end
        START: state <= BUSY;
        BUSY:  if (done_re && done_im) begin
                 m_data.re <= round_sat(48'(y_re), CF);
                 m_data.im <= round_sat(48'(y_im), CF);
                 state     <= OUT;
               end
        OUT:   if (m_ready) begin
                 i_cnt <= i_cnt + 1'b1;
                 if (i_cnt == PW'(H - 1)) begin
                   state <= LOAD;
                   wslot <= SW'((int'(wslot) + 1) % NT);
                 end else begin
                   state <= START;
                 end
               end
        default: state <= LOAD;
      endcase
    end
  end

  // the newest frame goes to bank wslot; during the first frame wslot = 0
  always_ff @(posedge clk) begin
    if (state == LOAD && s_valid) hist[wslot][waddr] <= s_data;
  end

  // both engines always run together
  property p_lockstep;
    @(posedge clk) disable iff (!rst_n) (busy_re == busy_im) && (done_re == done_im);
  endproperty
  assert property (p_lockstep);

endmodule
