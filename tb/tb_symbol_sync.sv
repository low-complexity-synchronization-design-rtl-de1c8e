// tb_symbol_sync: self-checking test of symbol boundary and FCFO
// detection. A stream of OFDM-like symbols (random useful samples with a
// cyclic prefix copied from their end) is rotated by a fractional CFO and
// starts at a random point inside a symbol. At each observation window
// the reported phase of the current sample must equal the true one within
// 1/8 of the guard interval (random data makes the correlation peak
// slightly ragged; any start inside the GI is free of interference), and the FCFO must equal the applied offset within 1/500 of a
// carrier spacing. 2K mode with GI 1/4 and 1/32, and 8K mode with GI 1/8.
module tb_symbol_sync;
  import dvbt_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0, found, fcfo_valid;
  fft_mode_e mode = MODE_2K;
  gi_e gi = GI_1_4;
  cplx_t in_data = '0;
  logic [CIW:0] sym_phase;
  logic [39:0] peak_mag;
  logic signed [15:0] fcfo;
  int checks = 0, failures = 0;

  symbol_sync dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int true_phase;     // phase of the sample presented last
  int tol;            // allowed timing error: 1/8 of the GI, inside the GI
  real eps;
  int n_found = 0, n_fcfo = 0;

  always @(posedge clk) if (rst_n) begin
    if (found) begin
      int d;
      n_found++;
      d = int'(sym_phase) - true_phase;
      checks++;
      if (d > tol || d < -tol) begin
        failures++; $display("phase %0d true %0d", sym_phase, true_phase);
      end
    end
    if (fcfo_valid) begin
      real e;
      n_fcfo++;
      e = real'(fcfo) / 65536.0 - eps;
      checks++;
      if (e > 0.002 || e < -0.002) begin
        failures++; $display("fcfo %f applied %f", real'(fcfo) / 65536.0, eps);
      end
    end
  end

  task automatic run(input fft_mode_e m, input gi_e g, input real e, input int nsym);
    int N, G, L, off, n;
    real sr [8192], si [8192];
    N = 1 << fft_log2(m); G = 1 << gi_log2(m, g); L = N + G;
    mode = m; gi = g; eps = e; tol = G / 8;
    off = $urandom_range(L - 1);
    n = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int s = 0; s < nsym; s++) begin
      for (int i = 0; i < N; i++) begin
        sr[i] = real'($signed($urandom_range(1200)) - 600);
        si[i] = real'($signed($urandom_range(1200)) - 600);
      end
      for (int i = (s == 0 ? off : 0); i < L; i++) begin
        real a, b, th;
        int k;
        k = (i < G) ? i + N - G : i - G;
        th = 2.0 * PI * e * real'(n) / real'(N);
        a = sr[k] * $cos(th) - si[k] * $sin(th);
        b = sr[k] * $sin(th) + si[k] * $cos(th);
        in_valid = 1;
        in_data.re = SW'(int'(a)); in_data.im = SW'(int'(b));
        true_phase = i;
        n++;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(MODE_2K, GI_1_4, 0.23, 5);
    run(MODE_2K, GI_1_32, -0.41, 5);
    run(MODE_8K, GI_1_8, 0.07, 4);
    checks++;
    if (n_found < 8 || n_fcfo != n_found) begin
      failures++; $display("%0d windows, %0d FCFO estimates", n_found, n_fcfo);
    end
    $display("windows %0d", n_found);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
