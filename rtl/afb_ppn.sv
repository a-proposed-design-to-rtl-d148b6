// afb_ppn - analysis polyphase network (receive filter bank) with DA filters.
//
// Receives samples r[n] (valid/ready) and, for every M/2 new samples once an
// L = K*M window is full, computes the M folded products of frame m
//   u[j] = sum_{q=0}^{K-1} p[jj + q*M] * r[m*M/2 + jj + q*M],  jj = (j-1) mod M
// which the FFT turns into the subcarrier outputs of half-symbol m. The
// sub-filters are applied in reverse order: u[M-1] leaves first and u[0]
// last, so a block-reversal memory must follow (rx_reorder). The window is kept
// in 2K banks of M/2 samples (one per half-block), so that the K taps of a
// product always sit in different banks. Each product uses two DA engines
// (real and imaginary parts), rounded from Q1.14 and saturated to DW bits.
// The jj = j-1 offset aligns the phase reference with the prototype centre.
// Timing: M/2 load clocks, then per output DW + 3 clocks plus any wait for
// m_ready; the first frame appears after 2K half-blocks have arrived.
// Reverse-order sub-filters and DA filtering follow the source design; the
// banked window and the sequencing are this design's choices.
module afb_ppn
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

  localparam int NB   = 2 * K;        // half-block banks
  localparam int H    = M / 2;
  localparam int HW   = $clog2(H);
  localparam int AW   = $clog2(M);
  localparam int BW   = $clog2(NB);
  localparam int ACCW = DW + CW + 4;

  typedef enum logic [1:0] {LOAD, START, BUSY, OUT} state_e;

  state_e        state;
  cplx_t         win [NB][H];
  logic [BW-1:0] wbank;           // bank being filled
  logic [HW-1:0] waddr;
  logic [BW:0]   nhb;             // half-blocks stored, saturates at NB
  logic [AW-1:0] j_cnt;           // output index, counts down
  logic [AW-1:0] jj;

  sample_t       x_re [K];
  sample_t       x_im [K];
  logic          busy_re, busy_im, done_re, done_im;
  logic signed [ACCW-1:0] y_re, y_im;

  assign s_ready = (state == LOAD);
  assign m_valid = (state == OUT);
  assign jj      = j_cnt - 1'b1;  // (j - 1) mod M

  // window offset l = jj + q*M lies in half-block l / H; the oldest half-block
  // is in the bank that will be filled next (wbank)
  always_comb begin
    for (int q = 0; q < K; q++) begin
      int hb, bank;
      hb   = (int'(jj) + q * M) / H;
      bank = (int'(wbank) + hb) % NB;
      x_re[q] = win[bank][HW'((int'(jj) + q * M) % H)].re;
      x_im[q] = win[bank][HW'((int'(jj) + q * M) % H)].im;
    end
  end

  da_engine #(.MODE(PPN_AFB), .M(M), .K(K)) u_da_re (
    .clk, .rst_n, .start(state == START), .phase(jj), .x(x_re),
    .busy(busy_re), .done(done_re), .y(y_re)
  );
  da_engine #(.MODE(PPN_AFB), .M(M), .K(K)) u_da_im (
    .clk, .rst_n, .start(state == START), .phase(jj), .x(x_im),
    .busy(busy_im), .done(done_im), .y(y_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= LOAD;
      wbank  <= '0;
      waddr  <= '0;
      nhb    <= '0;
      j_cnt  <= '0;
      m_data <= '0;
    end else begin
      unique case (state)
        LOAD:  if (s_valid) begin
                 waddr <= waddr + 1'b1;
                 if (waddr == HW'(H - 1)) begin
                   wbank <= BW'((int'(wbank) + 1) % NB);
                   if (nhb != (BW+1)'(NB)) nhb <= nhb + 1'b1;
                   if (int'(nhb) >= NB - 1) begin
                     state <= START;
                     j_cnt <= AW'(M - 1);
                   end
                 end
               end
        START: state <= BUSY;
        BUSY:  if (done_re && done_im) begin
                 m_data.re <= round_sat(48'(y_re), CF);
                 m_data.im <= round_sat(48'(y_im), CF);
                 state     <= OUT;
               end
        OUT:   if (m_ready) begin
                 j_cnt <= j_cnt - 1'b1;
                 state <= (j_cnt == '0) ? LOAD : START;
               end
        default: state <= LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == LOAD && s_valid) win[wbank][waddr] <= s_data;
  end

  property p_lockstep;
    @(posedge clk) disable iff (!rst_n) (busy_re == busy_im) && (done_re == done_im);
  endproperty
  assert property (p_lockstep);

endmodule
