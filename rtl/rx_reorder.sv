// rx_reorder - block reversal memory between the analysis filter and the FFT.
//
// The analysis filter delivers each block of M values in reverse order
// (last sub-filter first), while the FFT expects the first bin first. This
// block writes each block into one half of a two-bank dual-port memory with a
// counter and reads it back from the highest address down. Write and read
// work on different banks, so one block can be read while the next one is
// written. Interface: valid/ready on both sides; a block becomes readable the
// clock after its last value is written. The buffering into blocks and the
// order flip follow the source design; the two-bank arrangement is this
// design's choice.
module rx_reorder
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

  cplx_t         mem [2][M];
  logic          full [2];
  logic          wbank, rbank;
  logic [AW-1:0] waddr, rcnt;
  logic          wr, rd;

  assign s_ready = !full[wbank];
  assign m_valid = full[rbank];
  assign m_data  = mem[rbank][AW'(M - 1) - rcnt];
  assign wr      = s_valid && s_ready;
  assign rd      = m_valid && m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '{1'b0, 1'b0};
      wbank <= 1'b0;
      rbank <= 1'b0;
      waddr <= '0;
      rcnt  <= '0;
    end else begin
      if (wr) begin
        waddr <= waddr + 1'b1;
        if (waddr == AW'(M - 1)) begin
          full[wbank] <= 1'b1;
          wbank       <= !wbank;
        end
      end
      if (rd) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == AW'(M - 1)) begin
          full[rbank] <= 1'b0;
          rbank       <= !rbank;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wbank][waddr] <= s_data;
  end

endmodule
