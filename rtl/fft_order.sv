// fft_order - input buffer, group ordering and loop counter of the feedback FFT.
//
// Collects the N = T*T input points of a frame (one per clock, valid/ready),
// then hands the T-point core one group per clock. Group g holds the points
// buf[g + T*m], m = 0..T-1, i.e. x[k + t*m] of the two-loop decomposition
//   X[r + t*d] = sum_k W_t^(k*d) [ W_N^(r*k) sum_m x[k + t*m] W_t^(r*m) ].
// After the first loop has drained into the register block the whole register
// (fb_data) is copied back into the buffer, and the same strided groups are
// issued again for the second loop. A counter drives the two control signals:
//   wait_o   = 1 in the first loop (core output goes through the twiddle
//              multiplier), 0 in the second loop (straight to the register);
//   finish_o = 1 once the result is complete, until the last output point is
//              taken (unload_done).
// The strided grouping, the feedback copy and the wait/finish pair follow the
// source design; serial input, the drain counts LAT1/LAT2 (clocks from a group
// leaving here to its result being visible in fb_data) and the strictly
// sequential frame handling are this design's choices.
// Frame timing: N load clocks, T + LAT1 clocks, T + LAT2 clocks, then unload.
module fft_order
  import fbmc_pkg::*;
#(
  parameter int N    = 256,
  parameter int T    = 16,
  parameter int LAT1 = 6,
  parameter int LAT2 = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  cplx_t                s_data,
  input  cplx_t                fb_data  [N],
  output logic                 grp_valid,
  output logic [$clog2(T)-1:0] grp_tag,
  output cplx_t                grp_data [T],
  output logic                 wait_o,
  output logic                 finish_o,
  input  logic                 unload_done
);

  localparam int NW = $clog2(N);
  localparam int GW = $clog2(T);

  typedef enum logic [2:0] {LOAD, LOOP1, DRAIN1, LOOP2, DRAIN2, UNLOAD} state_e;
  state_e        state;
  logic [NW-1:0] cnt;
  cplx_t         buffer [N];

  assign s_ready   = (state == LOAD);
  assign grp_valid = (state == LOOP1) || (state == LOOP2);
  assign grp_tag   = cnt[GW-1:0];
  assign wait_o    = !((state == LOOP2) || (state == DRAIN2));
  assign finish_o  = (state == UNLOAD);

  for (genvar m = 0; m < T; m++) begin : g_sel
    assign grp_data[m] = buffer[NW'(m * T) + NW'(cnt[GW-1:0])];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOAD;
      cnt   <= '0;
    end else begin
      unique case (state)
        LOAD:   if (s_valid) begin
                  cnt <= cnt + 1'b1;
                  if (cnt == NW'(N - 1)) begin state <= LOOP1; cnt <= '0; end
                end
        LOOP1:  begin
                  cnt <= cnt + 1'b1;
                  if (cnt == NW'(T - 1)) begin state <= DRAIN1; cnt <= '0; end
                end
        DRAIN1: begin
                  cnt <= cnt + 1'b1;
                  if (cnt == NW'(LAT1 - 1)) begin state <= LOOP2; cnt <= '0; end
                end
        LOOP2:  begin
                  cnt <= cnt + 1'b1;
                  if (cnt == NW'(T - 1)) begin state <= DRAIN2; cnt <= '0; end
                end
        DRAIN2: begin
                  cnt <= cnt + 1'b1;
                  if (cnt == NW'(LAT2 - 1)) begin state <= UNLOAD; cnt <= '0; end
                end
        UNLOAD: if (unload_done) state <= LOAD;
        default: state <= LOAD;
      endcase
    end
  end

  // buffer: serial load, or copy of the register at the end of the first loop
  always_ff @(posedge clk) begin
    if (state == LOAD && s_valid)
      buffer[cnt] <= s_data;
    else if (state == DRAIN1 && cnt == NW'(LAT1 - 1))
      buffer <= fb_data;
  end

endmodule
