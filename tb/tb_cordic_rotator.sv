// tb_cordic_rotator: self-checking test of the CORDIC derotator.
// Drives random samples and phases, one per cycle, and compares every
// output with a floating-point rotation by minus the phase (tolerance
// 3 LSB). Also checks that the latency is ITER+2 cycles.
module tb_cordic_rotator;
  import dvbt_pkg::*;
  localparam int PW = 16, ITER = 14, N = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  cplx_t in_data, out_data;
  logic [PW-1:0] in_phase;
  int checks = 0, failures = 0;

  cordic_rotator #(.PW(PW), .ITER(ITER)) dut (.*);

  real exp_re [N], exp_im [N];
  int  in_cyc [N];
  int  cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_data = '0; in_phase = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      real th, a, b;
      @(negedge clk);
      in_valid = 1;
      in_data.re = SW'($signed($urandom_range(2800)) - 1400);
      in_data.im = SW'($signed($urandom_range(2800)) - 1400);
      in_phase = PW'($urandom);
      th = 2.0 * 3.14159265358979 * real'(in_phase) / real'(1 << PW);
      a = real'(in_data.re); b = real'(in_data.im);
      exp_re[k] = a * $cos(th) + b * $sin(th);
      exp_im[k] = b * $cos(th) - a * $sin(th);
      in_cyc[k] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 6) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("got %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    real dr, di;
    dr = real'(out_data.re) - exp_re[nout];
    di = real'(out_data.im) - exp_im[nout];
    checks++;
    if (dr > 3.0 || dr < -3.0 || di > 3.0 || di < -3.0) begin
      failures++;
      $display("sample %0d: got (%0d,%0d) expected (%f,%f)", nout, out_data.re, out_data.im, exp_re[nout], exp_im[nout]);
    end
    checks++;
    if (cyc - in_cyc[nout] != ITER + 2) begin
      failures++;
      $display("sample %0d: latency %0d", nout, cyc - in_cyc[nout]);
    end
    nout++;
  end
endmodule
