// tb_fft_order - self-checking test of the FFT order block and its counter.
//
// Loads a random N-point frame, checks that the first loop hands out group g
// = {x[g + T*m]} on T consecutive clocks with wait_o = 1, that after LAT1
// drain clocks the register contents (driven here as fb_data) are copied and
// the second loop hands out {fb[g + T*m]} with wait_o = 0, that finish_o
// rises LAT2 clocks later and stays until unload_done, and that no input is
// taken outside the load phase. Two frames.
module tb_fft_order;
  import fbmc_pkg::*;

  localparam int N    = 256;
  localparam int T    = 16;
  localparam int LAT1 = 6;
  localparam int LAT2 = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       s_valid, s_ready, grp_valid, wait_o, finish_o, unload_done;
  logic [3:0] grp_tag;
  cplx_t      s_data, fb_data [N], grp_data [T];
  cplx_t      x [N];

  fft_order #(.N(N), .T(T), .LAT1(LAT1), .LAT2(LAT2)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_groups(input bit second);
    for (int g = 0; g < T; g++) begin
      @(negedge clk);
      checks++;
      if (!grp_valid || grp_tag != 4'(g) || wait_o != !second || finish_o) begin
        failures++;
        $display("loop %0d clock %0d: valid %0b tag %0d wait %0b", second + 1, g, grp_valid, grp_tag, wait_o);
      end
      for (int m = 0; m < T; m++) begin
        checks++;
        if (grp_data[m] != (second ? fb_data[g + T * m] : x[g + T * m])) begin
          failures++;
          if (failures < 10) $display("loop %0d group %0d element %0d wrong", second + 1, g, m);
        end
      end
    end
  endtask

  initial begin
    s_valid = 0; s_data = '0; unload_done = 0;
    for (int i = 0; i < N; i++) fb_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        checks++;
        if (!s_ready || !wait_o || grp_valid) begin failures++; $display("not loading at %0d", i); end
        x[i]    = cplx_t'($urandom);
        s_valid = 1;
        s_data  = x[i];
      end
      // loop 1 starts on the clock after the last input
      expect_groups(0);
      s_valid = 0;
      // register contents appear during the drain
      for (int d = 0; d < LAT1; d++) begin
        @(negedge clk);
        checks++;
        if (grp_valid || s_ready || !wait_o) begin failures++; $display("drain 1 clock %0d wrong", d); end
        if (d == LAT1 - 1) for (int i = 0; i < N; i++) fb_data[i] = cplx_t'($urandom);
      end
      expect_groups(1);
      for (int i = 0; i < N; i++) fb_data[i] = ~fb_data[i];   // copy must already be taken
      for (int d = 0; d < LAT2; d++) begin
        @(negedge clk);
        checks++;
        if (grp_valid || wait_o || finish_o) begin failures++; $display("drain 2 clock %0d wrong", d); end
      end
      for (int u = 0; u < 10; u++) begin
        @(negedge clk);
        checks++;
        if (!finish_o || s_ready) begin failures++; $display("finish missing"); end
      end
      unload_done = 1;
      @(negedge clk);
      unload_done = 0;
      checks++;
      if (finish_o || !s_ready) begin failures++; $display("did not return to loading"); end
      // undo the inversion so the next frame's loop-2 check uses what was copied
      for (int i = 0; i < N; i++) fb_data[i] = ~fb_data[i];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
