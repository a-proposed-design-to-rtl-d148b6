// fft_core - T-point radix-2 FFT / IFFT core, one group of T points per clock.
//
// The core of the feedback FFT: all T points of a group enter in parallel and
// leave in parallel log2(T) clocks later (one pipeline register per radix-2
// stage, four stages for T=16 as in the source design). The butterflies are
// decimation-in-frequency; each halves its sum and difference, so the output is
// the DFT divided by T and can never overflow. Twiddles 1 and -j need no
// multiplier; the others use the three-multiplier complex product of
// fbmc_pkg::cmul3 (10 such rotations, 30 constant multiplications, for T=16). The bit
// reversal at the end is pure wiring, so out_data is in natural order:
//   out_data[k] = (1/T) * sum_n in_data[n] * exp(-/+ j*2*pi*n*k/T)
// with the + sign when inverse=1 (conjugate twiddles).
// in_tag travels with the data and leaves with it (out_valid, out_tag).
// Input parts should stay above -2^(DW-1): the -j rotation negates without
// saturation.
// DIF ordering, per-stage halving and the tag are this design's choices.
module fft_core
  import fbmc_pkg::*;
#(
  parameter int T    = 16,
  parameter int TAGW = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inverse,
  input  logic            in_valid,
  input  logic [TAGW-1:0] in_tag,
  input  cplx_t           in_data  [T],
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output cplx_t           out_data [T]
);

  localparam int S = $clog2(T);

  cplx_t           st   [S+1][T];
  logic            stv  [S+1];
  logic [TAGW-1:0] stt  [S+1];

  assign st[0]  = in_data;
  assign stv[0] = in_valid;
  assign stt[0] = in_tag;

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int H = T >> (s + 1);
    cplx_t comb_out [T];
    for (genvar i = 0; i < T; i++) begin : g_pt
      if ((i & H) == 0) begin : g_top
        // top output of the butterfly: (a + b) / 2
        assign comb_out[i].re = half({st[s][i].re[DW-1], st[s][i].re} + {st[s][i+H].re[DW-1], st[s][i+H].re});
        assign comb_out[i].im = half({st[s][i].im[DW-1], st[s][i].im} + {st[s][i+H].im[DW-1], st[s][i+H].im});
      end else begin : g_bot
        // bottom output: (a - b) / 2 * W_T^(j * 2^s), j = position in block
        localparam int E   = (i % (2 * H) - H) << s;
        localparam int C   = tw_cos(E, T);
        localparam int SN  = tw_sin(E, T);
        cplx_t diff;
        assign diff.re = half({st[s][i-H].re[DW-1], st[s][i-H].re} - {st[s][i].re[DW-1], st[s][i].re});
        assign diff.im = half({st[s][i-H].im[DW-1], st[s][i-H].im} - {st[s][i].im[DW-1], st[s][i].im});
        if (E == 0) begin : g_triv
          assign comb_out[i] = diff;
        end else if (4 * E == T) begin : g_quarter
          // W_T^(T/4) = -j (forward) or +j (inverse): swap and negate only
          assign comb_out[i].re = inverse ? -diff.im : diff.im;
          assign comb_out[i].im = inverse ? diff.re : -diff.re;
        end else begin : g_rot
          // forward: d = -sin, inverse: d = +sin
          logic signed [TWW-1:0] c_q, cmd_q, cpd_q;
          assign c_q   = TWW'(C);
          assign cmd_q = inverse ? TWW'(C - SN) : TWW'(C + SN);
          assign cpd_q = inverse ? TWW'(C + SN) : TWW'(C - SN);
          assign comb_out[i] = cmul3(diff, c_q, cmd_q, cpd_q);
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        stv[s+1] <= 1'b0;
        stt[s+1] <= '0;
      end else begin
        stv[s+1] <= stv[s];
        stt[s+1] <= stt[s];
      end
    end
    always_ff @(posedge clk) st[s+1] <= comb_out;
  end

  // bit-reversed wiring back to natural order
  function automatic int bitrev(int v);
    int r = 0;
    for (int b = 0; b < S; b++) if ((v & (1 << b)) != 0) r |= 1 << (S - 1 - b);
    return r;
  endfunction

  for (genvar k = 0; k < T; k++) begin : g_out
    assign out_data[k] = st[S][bitrev(k)];
  end
  assign out_valid = stv[S];
  assign out_tag   = stt[S];

endmodule
