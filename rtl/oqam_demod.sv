// oqam_demod - OQAM post-processing of the receiver.
//
// Takes the FFT output frames u_m[k] (k = 0..M-1, one per clock,
// valid/ready), removes the phase theta = j^(k+m) and keeps the real part:
//   d_k,m = Re{ conj(j^(k+m)) * u_m[k] }
// The values of an even frame (real parts of the symbols) are stored in an
// M-word buffer; during the following odd frame each value is joined with
// its stored real part and leaves as the complex symbol d_k,2n + j d_k,2n+1.
// Output rate is half the input rate. The block is the inverse of oqam_mod;
// the phase rule and the buffering are this design's choices.
module oqam_demod
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

  logic          odd;
  logic [AW-1:0] k;
  logic [1:0]    mph;
  sample_t       rebuf [M];
  sample_t       d;
  logic [1:0]    p;
  logic          take;

  assign p       = 2'(k) + mph;
  assign m_valid = odd && s_valid;
  assign s_ready = odd ? m_ready : 1'b1;
  assign take    = s_valid && s_ready;
  assign m_data  = '{re: rebuf[k], im: d};

  always_comb begin
    unique case (p)
      2'd0: d = s_data.re;
      2'd1: d = s_data.im;
      2'd2: d = -s_data.re;
      2'd3: d = -s_data.im;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd <= 1'b0;
      k   <= '0;
      mph <= '0;
    end else if (take) begin
      k <= k + 1'b1;
      if (k == AW'(M - 1)) begin
        odd <= !odd;
        mph <= mph + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take && !odd) rebuf[k] <= d;
  end

endmodule
