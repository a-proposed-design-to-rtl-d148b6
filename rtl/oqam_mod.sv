// oqam_mod - OQAM pre-processing of the transmitter.
//
// Each complex symbol c_k = a + jb of subcarrier k (k = 0..M-1, one per clock,
// valid/ready) is split into two real half-symbols: frame m = 2n carries a,
// frame m = 2n+1 carries b, each multiplied by the phase theta = j^(k+m), so
// every output value is purely real or purely imaginary. The output rate is
// twice the symbol rate. During the real frame the input passes straight
// through (in_ready follows out_ready) and b is stored in an M-word buffer;
// during the imaginary frame the buffer is read out and no input is taken.
// The rate doubling follows the source design; the phase rule j^(k+m) is the
// usual OQAM mapping and, like the buffering, this design's choice.
// Inputs must lie in -(2^(DW-1)-1) .. 2^(DW-1)-1 (negation must not overflow).
module oqam_mod
  import fbmc_pkg::*;
#(
  parameter int M = 256
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

  localparam int AW = $clog2(M);

  logic          odd;         // 0: real frame, 1: imaginary frame
  logic [AW-1:0] k;
  logic [1:0]    mph;         // frame index m mod 4
  sample_t       imbuf [M];
  sample_t       a;
  logic [1:0]    p;

  assign a       = odd ? imbuf[k] : s_data.re;
  assign p       = 2'(k) + mph;
  assign m_valid = odd ? 1'b1 : s_valid;
  assign s_ready = odd ? 1'b0 : m_ready;

  always_comb begin
    unique case (p)
      2'd0: m_data = '{re: a,  im: '0};
      2'd1: m_data = '{re: '0, im: a};
      2'd2: m_data = '{re: -a, im: '0};
      2'd3: m_data = '{re: '0, im: -a};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd <= 1'b0;
      k   <= '0;
      mph <= '0;
    end else if (m_valid && m_ready) begin
      k <= k + 1'b1;
      if (k == AW'(M - 1)) begin
        odd <= !odd;
        mph <= mph + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!odd && s_valid && m_ready) imbuf[k] <= s_data.im;
  end

endmodule
