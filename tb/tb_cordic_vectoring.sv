// tb_cordic_vectoring: self-checking test of the CORDIC tan^-1 unit.
// Random complex inputs over all four quadrants; the output angle is
// compared with $atan2 (tolerance 2 LSB of a 16-bit turn, with wrap) and
// the magnitude with 1.6468*|z| (tolerance 0.1 %). Latency ITER+1 cycles.
module tb_cordic_vectoring;
  localparam int DW = 24, PW = 16, ITER = 16, N = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [DW-1:0] in_re, in_im;
  logic signed [PW-1:0] out_angle;
  logic [DW:0] out_mag;
  int checks = 0, failures = 0;

  cordic_vectoring #(.DW(DW), .PW(PW), .ITER(ITER)) dut (.*);

  real exp_ang [N], exp_mag [N];
  int in_cyc [N];
  int cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_re = 0; in_im = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      real a, b;
      @(negedge clk);
      in_valid = 1;
      in_re = DW'($signed($urandom_range(4000000)) - 2000000);
      in_im = DW'($signed($urandom_range(4000000)) - 2000000);
      if (k < 4) begin in_re = (k[0] ? -DW'(100000) : DW'(100000)); in_im = (k[1] ? -DW'(1) : DW'(0)); end
      a = real'(in_re); b = real'(in_im);
      exp_ang[k] = $atan2(b, a) / (2.0 * 3.14159265358979) * real'(1 << PW);
      exp_mag[k] = 1.646760258 * $sqrt(a * a + b * b);
      in_cyc[k] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 6) @(posedge clk);
    checks++;
    if (nout != N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    real d, m;
    d = real'(out_angle) - exp_ang[nout];
    if (d > 32768.0) d -= 65536.0;
    if (d < -32768.0) d += 65536.0;
    m = real'(out_mag) - exp_mag[nout];
    checks++;
    if (d > 2.0 || d < -2.0 || m > 0.001 * exp_mag[nout] + 2.0 || m < -0.001 * exp_mag[nout] - 2.0) begin
      failures++;
      $display("sample %0d: angle %0d exp %f mag %0d exp %f", nout, out_angle, exp_ang[nout], out_mag, exp_mag[nout]);
    end
    checks++;
    if (cyc - in_cyc[nout] != ITER + 1) failures++;
    nout++;
  end
endmodule
