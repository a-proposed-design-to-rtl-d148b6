// axis_fifo - synchronous FIFO with AXI4-Stream style tvalid/tready/tdata.
//
// Sits behind each FFT and turns its frame-at-a-time output into a sample
// stream for the next block. DEPTH words of WIDTH bits in a circular memory
// with read and write pointers and an occupancy counter. s_tready is high
// while the FIFO is not full, m_tvalid while it is not empty; the head word is
// shown on m_tdata (first-word fall-through), so a word written in one clock
// can be read in the next. Its place in the datapath follows the source
// design; depth and fall-through behaviour are this design's choices.
module axis_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s_tvalid,
  output logic             s_tready,
  input  logic [WIDTH-1:0] s_tdata,
  output logic             m_tvalid,
  input  logic             m_tready,
  output logic [WIDTH-1:0] m_tdata
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             wr, rd;

  assign s_tready = (count != (AW+1)'(DEPTH));
  assign m_tvalid = (count != '0);
  assign m_tdata  = mem[rptr];
  assign wr       = s_tvalid && s_tready;
  assign rd       = m_tvalid && m_tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= s_tdata;
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
