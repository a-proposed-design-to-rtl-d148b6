// tb_twiddle_mult - self-checking test of the inter-loop twiddle multiplier.
//
// For every group k = 0..T-1, forward and inverse, lane r gets a random value
// and the output must equal x * exp(-/+ j*2*pi*r*k/N) from floating point
// within TOL LSB, one clock after the input. Values near full scale are used
// so the table entries of the second half (negated) are exercised too.
module tb_twiddle_mult;
  import fbmc_pkg::*;

  localparam int N   = 256;
  localparam int T   = 16;
  localparam int TOL = 2;

  function automatic real absr(real v); return v < 0 ? -v : v; endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        inverse, in_valid, out_valid;
  logic [3:0]  in_group, out_group;
  cplx_t       in_data [T], out_data [T];

  twiddle_mult #(.N(N), .T(T)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr [T], xi [T];
    in_valid = 0; inverse = 0; in_group = 0;
    for (int r = 0; r < T; r++) in_data[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int inv = 0; inv < 2; inv++)
      for (int k = 0; k < T; k++) begin
        @(negedge clk);
        inverse  = inv[0];
        in_valid = 1;
        in_group = 4'(k);
        for (int r = 0; r < T; r++) begin
          xr[r] = real'(int'($urandom_range(32000)) - 16000);
          xi[r] = real'(int'($urandom_range(32000)) - 16000);
          in_data[r] = '{re: DW'(int'(xr[r])), im: DW'(int'(xi[r]))};
        end
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || out_group != 4'(k)) begin failures++; $display("valid/group wrong"); end
        for (int r = 0; r < T; r++) begin
          real ang, er, ei;
          ang = ((inv != 0) ? 1.0 : -1.0) * 2.0 * PI * real'(r * k) / N;
          er  = xr[r] * $cos(ang) - xi[r] * $sin(ang);
          ei  = xr[r] * $sin(ang) + xi[r] * $cos(ang);
          checks++;
          if (absr(real'(out_data[r].re) - er) > TOL || absr(real'(out_data[r].im) - ei) > TOL) begin
            failures++;
            if (failures < 10) $display("k=%0d r=%0d inv=%0d: got %f,%f want %f,%f", k, r, inv,
                                        real'(out_data[r].re), real'(out_data[r].im), er, ei);
          end
        end
      end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
