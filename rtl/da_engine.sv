// da_engine - distributed-arithmetic inner product with fixed coefficients.
//
// Computes y = sum_t c[phase][t] * x[t] exactly, without multipliers. The
// NTAP input samples are loaded in parallel into bit shift registers. Every
// clock one bit of every sample (MSB first) addresses the arithmetic tables:
// the taps are split into groups of four, each group addressing a 16-word
// table of partial coefficient sums (the "lut_a"/"lut_b" pairs of the source
// design), and the table outputs are added. The scaling accumulator then does
//   acc <= 2*acc - table   for the sign bit (first clock),
//   acc <= 2*acc + table   for the other bits,
// so after DW clocks acc is the two's-complement weighted sum. The tables are
// built at elaboration from the prototype filter: one set of tables per phase
// of the polyphase network (MODE = synthesis: NTAP = 2K taps p[ph + t*M/2],
// M/2 phases; MODE = analysis: NTAP = K taps p[ph + t*M], M phases).
// Interface: pulse start with x and phase valid (ignored while busy); done
// pulses DW+1 clocks later with y valid, and y holds until the next done.
// Table, shifter and +/- accumulator follow the source design; MSB-first
// order, four-input tables and the coefficient set are this design's choices.
module da_engine
  import fbmc_pkg::*;
#(
  parameter ppn_mode_e MODE = PPN_SFB,
  parameter int        M    = 256,
  parameter int        K    = 4,
  localparam int       NTAP = (MODE == PPN_SFB) ? 2 * K : K,
  localparam int       NPH  = (MODE == PPN_SFB) ? M / 2 : M,
  localparam int       PW   = $clog2(NPH),
  localparam int       ACCW = DW + CW + 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [PW-1:0]          phase,
  input  sample_t                x [NTAP],
  output logic                   busy,
  output logic                   done,
  output logic signed [ACCW-1:0] y
);

  localparam int NG = (NTAP + 3) / 4;   // number of 4-input tables
  localparam int LW = CW + 3;           // table word: sum of up to 4 coefficients

  typedef logic signed [LW-1:0] lut_t [NPH * NG * 16];

  // Table word for phase ph, group g, address a (bit b of a selects tap 4g+b).
  function automatic lut_t gen_lut();
    lut_t r;
    int   c [NTAP];
    for (int ph = 0; ph < NPH; ph++) begin
      for (int t = 0; t < NTAP; t++) c[t] = ppn_coef(MODE, M, K, ph, t);
      for (int g = 0; g < NG; g++)
        for (int a = 0; a < 16; a++) begin
          int s = 0;
          for (int b = 0; b < 4; b++)
            if (((a >> b) & 1) == 1 && 4 * g + b < NTAP) s += c[4 * g + b];
          r[(ph * NG + g) * 16 + a] = LW'(s);
        end
    end
    return r;
  endfunction

  localparam lut_t LUT = gen_lut();

  sample_t                 sreg [NTAP];
  logic [PW-1:0]           ph_q;
  logic [$clog2(DW)-1:0]   bitn;     // bits still to process after this one
  logic                    first;
  logic signed [ACCW-1:0]  acc;
  logic signed [LW+2:0]    table_sum;

  always_comb begin
    table_sum = '0;
    for (int g = 0; g < NG; g++) begin
      logic [3:0] a;
      for (int b = 0; b < 4; b++)
        a[b] = (4 * g + b < NTAP) ? sreg[(4 * g + b) % NTAP][DW-1] : 1'b0;
      table_sum = table_sum + (LW+3)'(LUT[(int'(ph_q) * NG + g) * 16 + int'(a)]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      first <= 1'b0;
      bitn  <= '0;
      acc   <= '0;
      y     <= '0;
      ph_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          first <= 1'b1;
          bitn  <= $clog2(DW)'(DW - 1);
          ph_q  <= phase;
          acc   <= '0;
        end
      end else begin
        first <= 1'b0;
        if (first) acc <= -ACCW'(table_sum);
        else       acc <= (acc <<< 1) + ACCW'(table_sum);
        bitn <= bitn - 1'b1;
        if (bitn == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= (acc <<< 1) + ACCW'(table_sum);
        end
      end
    end
  end

  // bit shift registers, MSB first
  always_ff @(posedge clk) begin
    if (!busy && start) sreg <= x;
    else if (busy)
      for (int t = 0; t < NTAP; t++) sreg[t] <= sreg[t] <<< 1;
  end

endmodule
