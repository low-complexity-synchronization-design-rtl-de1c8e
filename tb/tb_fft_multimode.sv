// tb_fft_multimode: self-checking test of the 2K/4K/8K FFT. Random
// symbols are streamed in with random gaps; every output bin of the
// checked symbols is compared with a floating-point DFT of the same
// quantized input, X(k) * 2^floor(L/2) / N with L = log2 N, in centred
// order (bin -N/2 first). Tolerance: 6 LSB per bin. Runs 2K mode
// (two symbols checked), then 4K and 8K mode (one symbol each).
module tb_fft_multimode;
  import dvbt_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fft_mode_e mode = MODE_2K;
  logic in_valid = 0, in_sof = 0, out_valid, out_sof, out_eof;
  cplx_t in_data = '0, out_data;
  logic [12:0] out_bin;
  int checks = 0, failures = 0;

  fft_multimode dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected spectra of up to 4 symbols
  real xr [4][8192], xi [4][8192];
  real ex_r [4][8192], ex_i [4][8192];
  real cs [8192], sn [8192];
  int  n_len, lg, out_sym, nbins, maxerr;

  task automatic make_symbol(input int s);
    for (int n = 0; n < n_len; n++) begin
      xr[s][n] = real'($signed($urandom_range(1200)) - 600);
      xi[s][n] = real'($signed($urandom_range(1200)) - 600);
    end
    for (int n = 0; n < n_len; n++) begin cs[n] = $cos(2.0 * PI * n / n_len); sn[n] = $sin(2.0 * PI * n / n_len); end
    for (int k = 0; k < n_len; k++) begin
      real ar, ai;
      int idx;
      ar = 0.0; ai = 0.0; idx = 0;
      for (int n = 0; n < n_len; n++) begin
        // x * exp(-j 2 pi k n / N)
        ar += xr[s][n] * cs[idx] + xi[s][n] * sn[idx];
        ai += xi[s][n] * cs[idx] - xr[s][n] * sn[idx];
        idx = (idx + k) % n_len;
      end
      ex_r[s][k] = ar * real'(1 << (lg / 2)) / real'(n_len);
      ex_i[s][k] = ai * real'(1 << (lg / 2)) / real'(n_len);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int k;
    real dr, di;
    if (out_sof) nbins = 0;
    k = (int'(out_bin) + n_len / 2) % n_len;   // centred order
    checks++;
    dr = real'(out_data.re) - ex_r[out_sym][k];
    di = real'(out_data.im) - ex_i[out_sym][k];
    if (dr > 6.0 || dr < -6.0 || di > 6.0 || di < -6.0) begin
      failures++;
      if (failures < 10) $display("sym %0d bin %0d: (%0d,%0d) expected (%f,%f)", out_sym, k, out_data.re, out_data.im, ex_r[out_sym][k], ex_i[out_sym][k]);
    end
    nbins++;
    if (out_eof) begin
      checks++;
      if (nbins != n_len) begin failures++; $display("symbol with %0d bins", nbins); end
      out_sym++;
    end
  end

  task automatic run(input fft_mode_e m, input int nsym);
    mode = m; lg = fft_log2(m); n_len = 1 << lg;
    out_sym = 0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < nsym; s++) make_symbol(s);
    for (int s = 0; s < nsym; s++) begin
      for (int n = 0; n < n_len; n++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (n == 0);
        in_data.re = SW'(int'(xr[s][n])); in_data.im = SW'(int'(xi[s][n]));
        @(negedge clk) in_valid = 0; in_sof = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
      end
    end
    // flush: the pipeline holds a few samples of the last symbol
    for (int n = 0; n < 64; n++) begin
      @(negedge clk) in_valid = 1; in_data = '0;
      @(negedge clk) in_valid = 0;
    end
    repeat (n_len + 100) @(negedge clk);
    checks++;
    if (out_sym != nsym - 1) begin failures++; $display("mode %0d: %0d symbols out", m, out_sym); end
  endtask

  initial begin
    run(MODE_2K, 3);
    run(MODE_4K, 2);
    run(MODE_8K, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
