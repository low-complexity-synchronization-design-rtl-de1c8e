// tb_lagrange_interp: self-checking test of the cubic Lagrange
// interpolator. Random samples are shifted in; after each, an output is
// requested with a random mu in [-0.5, 0.5]. The expected value is the
// Lagrange polynomial through the last four samples evaluated at mu in
// floating point (tolerance 2 LSB). Also checks exact reproduction of a
// cubic ramp and the two-cycle latency.
module tb_lagrange_interp;
  import dvbt_pkg::*;
  localparam int MUW = 12, N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, calc = 0, out_valid;
  cplx_t in_data = '0, out_data;
  logic signed [MUW-1:0] mu = '0;
  int checks = 0, failures = 0;

  lagrange_interp #(.MUW(MUW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real hr [4], hi [4];  // hr[3] newest
  function automatic real lag(real p [4], real t);
    // points at t = -1, 0, 1, 2
    return p[0] * (t) * (t - 1) * (t - 2) / -6.0
         + p[1] * (t + 1) * (t - 1) * (t - 2) / 2.0
         + p[2] * (t + 1) * (t) * (t - 2) / -2.0
         + p[3] * (t + 1) * (t) * (t - 1) / 6.0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N + 3; k++) begin
      real t, er, ei;
      @(negedge clk);
      in_valid = 1;
      if (k < 20) begin  // slow cubic ramp: interpolated exactly
        in_data.re = SW'((k - 10) * (k - 10) * (k - 10) / 2);
        in_data.im = SW'(50 * k - 400);
      end else begin
        in_data.re = SW'($signed($urandom_range(3000)) - 1500);
        in_data.im = SW'($signed($urandom_range(3000)) - 1500);
      end
      for (int i = 0; i < 3; i++) begin hr[i] = hr[i+1]; hi[i] = hi[i+1]; end
      hr[3] = real'(in_data.re); hi[3] = real'(in_data.im);
      @(negedge clk);
      in_valid = 0;
      if (k < 3) continue;
      calc = 1;
      mu = MUW'($signed($urandom_range(1 << (MUW - 1))) - (1 << (MUW - 2)));
      t = real'(mu) / real'(1 << (MUW - 1));
      er = lag(hr, t); ei = lag(hi, t);
      @(negedge clk) calc = 0;
      checks++;
      if (out_valid) failures++;          // not before 2 cycles
      @(negedge clk);
      checks++;
      if (!out_valid || (real'(out_data.re) - er > 2.0 || er - real'(out_data.re) > 2.0) || (real'(out_data.im) - ei > 2.0 || ei - real'(out_data.im) > 2.0)) begin
        failures++;
        $display("k=%0d mu=%f got (%0d,%0d) expected (%f,%f)", k, t, out_data.re, out_data.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
