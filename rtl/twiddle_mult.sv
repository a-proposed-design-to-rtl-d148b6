// twiddle_mult - inter-loop twiddle multiplier of the feedback FFT.
//
// After the first pass of the core, lane r of group k must be multiplied by
// W_N^(r*k). Each lane uses the three-real-multiplier complex product
//   re = (C - D) B + C (A - B),   im = (C + D) A - C (A - B)
// for the input A + jB and twiddle C + jD. A table holds C, C-D and C+D for
// the first N/2 twiddles only; for exponents N/2..N-1 the three values are
// negated, since W_N^(e+N/2) = -W_N^e. For the inverse transform the twiddle
// is conjugated, which only swaps the C-D and C+D entries. The table, the
// three-multiplier form and the half-size table follow the source design; the
// Q2.14 twiddle format and the single register stage are this design's choice.
// Latency: one clock (in_valid/in_group -> out_valid/out_group).
module twiddle_mult
  import fbmc_pkg::*;
#(
  parameter int N = 256,
  parameter int T = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inverse,
  input  logic                 in_valid,
  input  logic [$clog2(T)-1:0] in_group,
  input  cplx_t                in_data  [T],
  output logic                 out_valid,
  output logic [$clog2(T)-1:0] out_group,
  output cplx_t                out_data [T]
);

  localparam int EW = $clog2(N);

  typedef logic signed [TWW-1:0] tw_rom_t [N/2];

  // Forward twiddle W_N^e = cos(2 pi e/N) - j sin(2 pi e/N): C = cos, D = -sin.
  // sel 0: C, sel 1: C - D, sel 2: C + D
  function automatic tw_rom_t gen_rom(int sel);
    tw_rom_t r;
    for (int e = 0; e < N / 2; e++)
      r[e] = (sel == 0) ? TWW'(tw_cos(e, N)) :
             (sel == 1) ? TWW'(tw_cos(e, N) + tw_sin(e, N)) :
                          TWW'(tw_cos(e, N) - tw_sin(e, N));
    return r;
  endfunction

  localparam tw_rom_t ROM_C   = gen_rom(0);
  localparam tw_rom_t ROM_CMD = gen_rom(1);
  localparam tw_rom_t ROM_CPD = gen_rom(2);

  cplx_t prod [T];

  for (genvar r = 0; r < T; r++) begin : g_lane
    logic [EW-1:0]         e;
    logic signed [TWW-1:0] tc, tcmd, tcpd, c, cmd, cpd;
    always_comb begin
      e   = EW'(r) * EW'(in_group);            // r*k < N because r, k < T
      tc   = ROM_C[e[EW-2:0]];
      tcmd = inverse ? ROM_CPD[e[EW-2:0]] : ROM_CMD[e[EW-2:0]];
      tcpd = inverse ? ROM_CMD[e[EW-2:0]] : ROM_CPD[e[EW-2:0]];
      c    = e[EW-1] ? -tc   : tc;
      cmd  = e[EW-1] ? -tcmd : tcmd;
      cpd  = e[EW-1] ? -tcpd : tcpd;
    end
    assign prod[r] = cmul3(in_data[r], c, cmd, cpd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_group <= '0;
    end else begin
      out_valid <= in_valid;
      out_group <= in_group;
    end
  end
  always_ff @(posedge clk) out_data <= prod;

endmodule
