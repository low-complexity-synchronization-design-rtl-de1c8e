// tb_dvbt_sync_top: end-to-end test of the synchronization datapath at its
// default (full) size, 2K mode, GI 1/4.
//
// A behavioural transmitter builds DVB-T-like OFDM symbols: 1705 carriers,
// continual pilots on the standard positions and scattered pilots on
// 3*(l mod 4) + 12p (both boosted to 4/3, fixed pseudo-random sign per
// carrier), QPSK data elsewhere. The channel adds a carrier frequency
// offset of 2.2 carrier spacings (ICFO 2 + FCFO 0.2), a sampling clock
// offset of +/-PPM (the receiver takes sample m at transmitter time
// t0 + m*(1 + ppm*1e-6), the signal is evaluated exactly at that time) and
// a little uniform noise. Samples are fed one per 4 clocks.
// Until the first SPS restart has been observed the transmitter steps
// the scattered pilot phase by 2 per symbol instead of 1 (a deliberate
// pattern error), so the 2nd SPS stage must reject the prediction.
//
// Two runs: +PPM (the interpolator must insert samples: doubles) and
// -PPM (skips). Each run checks: symbol found, ICFO = 2, tracking starts,
// RCFO/SCO estimates arrive, the NCO frequency converges to the CFO, the
// interpolator step converges to -ppm*2^23, GI phase predictions happen,
// SPS first stage / confirm / restart / lock all happen, pre-fill banks
// are filled, the demapper answers, and finally holding the FFT input
// (ce_ready low) overflows the elastic buffer. A mechanism that never
// happens is a failure.
module tb_dvbt_sync_top;
  import dvbt_pkg::*;
  localparam real PI  = 3.14159265358979;
  localparam int  N   = 2048;
  localparam int  G   = 512;
  localparam int  L   = N + G;
  localparam int  K   = 1705;
  localparam int  KC  = 852;
  localparam int  NSYM = 40;
  localparam real PPM = 100.0;
  localparam real CFO = 2.2;     // carrier spacings

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fft_mode_e mode = MODE_2K;
  gi_e       gi   = GI_1_4;
  logic [1:0] qam = 2'd0;
  logic      rx_valid = 0, ce_ready = 1, eq_valid = 0;
  cplx_t     rx_data = '0, eq_data = '0;
  logic      fft_valid, fft_sof, dm_valid, sym_found, tracking, icfo_valid, est_valid;
  cplx_t     fft_data, pf_rd_data;
  logic [12:0] fft_bin;
  logic [5:0]  dm_bits, pf_bank_valid;
  logic [2:0]  dm_nbits, pf_rd_bank = '0;
  logic [9:0]  pf_rd_addr = '0;
  logic signed [7:0]  icfo;
  logic signed [16:0] rcfo_err, sco_err;
  logic signed [23:0] nco_freq, sco_delta;
  logic        predict_ev, sps_first, sps_confirm, sps_restart, sps_lock, ebuf_overflow;
  logic [15:0] skip_cnt, double_cnt;
  sps_state_e  sps_state;
  logic [1:0]  sps_mode;

  dvbt_sync_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- events
  int n_pred, n_first, n_confirm, n_restart, n_est, n_icfo, n_dm, n_lock_cyc;
  always @(posedge clk) if (rst_n) begin
    if (predict_ev)  n_pred++;
    if (sps_first)   n_first++;
    if (sps_confirm) n_confirm++;
    if (sps_restart) n_restart++;
    if (est_valid)   n_est++;
    if (icfo_valid)  n_icfo++;
    if (dm_valid)    n_dm++;
    if (sps_lock)    n_lock_cyc++;
  end

  // ------------------------------------------------------------ transmitter
  int  cp_diff [44] = '{48, 6, 33, 54, 15, 36, 9, 54, 24, 3, 51, 99, 18, 33, 42,
                        6, 87, 18, 78, 45, 6, 15, 24, 69, 15, 30, 21, 3, 27, 15,
                        66, 51, 6, 3, 27, 3, 6, 60, 63, 54, 54, 114, 192, 21};
  bit  is_cp [K];
  real psign [K];
  real xr [K], xi [K];
  int  cur_sym, spm;
  bit  glitch_on;

  task automatic init_tx();
    int p;
    for (int k = 0; k < K; k++) begin
      is_cp[k] = 0;
      psign[k] = ($urandom_range(1) == 1) ? 4.0 / 3.0 : -4.0 / 3.0;
    end
    p = 0;
    is_cp[0] = 1;
    for (int i = 0; i < 44; i++) begin
      p += cp_diff[i];
      is_cp[p] = 1;
    end
    cur_sym = -1;
    spm = 0;
    glitch_on = 1;
  endtask

  task automatic make_symbol();
    spm = (spm + (glitch_on ? 2 : 1)) % 4;
    for (int k = 0; k < K; k++) begin
      if (is_cp[k] || (k % 12) == 3 * spm) begin
        xr[k] = psign[k]; xi[k] = 0.0;
      end else begin
        xr[k] = ($urandom_range(1) == 1) ? 0.7071 : -0.7071;
        xi[k] = ($urandom_range(1) == 1) ? 0.7071 : -0.7071;
      end
    end
  endtask

  // transmitted signal at (real) time t, in samples
  task automatic tx_at(input real t, output int ore, output int oim);
    int  s;
    real u, a, wr, wi, pr, pi, sr, si, tr, cr, ci;
    s = int'($floor(t / L));
    while (cur_sym < s) begin
      cur_sym++;
      make_symbol();
    end
    u  = t - real'(s) * L - G;          // CP is the cyclic extension
    a  = 2.0 * PI * u / N;
    wr = $cos(a); wi = $sin(a);
    pr = $cos(-KC * a); pi = $sin(-KC * a);
    sr = 0.0; si = 0.0;
    for (int k = 0; k < K; k++) begin
      sr += xr[k] * pr - xi[k] * pi;
      si += xr[k] * pi + xi[k] * pr;
      tr = pr * wr - pi * wi;
      pi = pr * wi + pi * wr;
      pr = tr;
    end
    // carrier frequency offset
    a  = 2.0 * PI * CFO * t / N;
    cr = $cos(a); ci = $sin(a);
    tr = sr * cr - si * ci;
    si = sr * ci + si * cr;
    sr = tr;
    ore = int'(sr * 6.0) + $signed($urandom_range(6)) - 3;
    oim = int'(si * 6.0) + $signed($urandom_range(6)) - 3;
    if (ore > SMAX) ore = SMAX;
    if (ore < -SMAX) ore = -SMAX;
    if (oim > SMAX) oim = SMAX;
    if (oim < -SMAX) oim = -SMAX;
  endtask

  // demapper stimulus: a few QPSK points
  always @(negedge clk) begin
    eq_valid <= ($urandom_range(15) == 0);
    eq_data.re <= ($urandom_range(1) == 1) ? SW'(100) : -SW'(100);
    eq_data.im <= ($urandom_range(1) == 1) ? SW'(100) : -SW'(100);
  end

  task automatic run(input real ppm);
    real t, zeta, exp_delta, exp_freq;
    int  re, im, nsamp;
    bit  locked_seen;
    n_pred = 0; n_first = 0; n_confirm = 0; n_restart = 0; n_est = 0;
    n_icfo = 0; n_dm = 0; n_lock_cyc = 0;
    init_tx();
    zeta = ppm * 1.0e-6;
    ce_ready = 1;
    rx_valid = 0;
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    nsamp = NSYM * L;
    locked_seen = 0;
    for (int m = 0; m < nsamp; m++) begin
      t = 777.3 + real'(m) * (1.0 + zeta);
      tx_at(t, re, im);
      @(negedge clk);
      rx_valid = 1;
      rx_data.re = SW'(re);
      rx_data.im = SW'(im);
      @(negedge clk) rx_valid = 0;
      repeat (2) @(negedge clk);
      if (n_restart > 0) glitch_on = 0;
      if (sps_lock) locked_seen = 1;
    end
    exp_freq  = CFO * (1.0 + zeta) * real'(1 << 24) / N;
    exp_delta = -zeta * real'(1 << 23);
    $display("run ppm=%0.1f: icfo=%0d nco_freq=%0d (exp %0.0f) sco_delta=%0d (exp %0.0f) skip=%0d double=%0d pred=%0d est=%0d sps first/confirm/restart=%0d/%0d/%0d lock=%0d banks=%b",
             ppm, icfo, int'(nco_freq), exp_freq, int'(sco_delta), exp_delta, skip_cnt, double_cnt,
             n_pred, n_est, n_first, n_confirm, n_restart, locked_seen, pf_bank_valid);
    check(sym_found, "symbol timing found");
    check(n_icfo > 0 && icfo == 8'sd2, "ICFO estimate 2");
    check(tracking, "tracking started");
    check(n_est > 5, "RCFO/SCO estimates");
    check(real'(nco_freq) > exp_freq - 200.0 && real'(nco_freq) < exp_freq + 200.0, "NCO frequency converged");
    check(real'(sco_delta) > exp_delta - 0.3 * 839.0 && real'(sco_delta) < exp_delta + 0.3 * 839.0,
          "interpolator step converged");
    check(n_pred > 10, "GI phase prediction");
    if (ppm > 0.0) check(double_cnt > 0, "interpolator double");
    else           check(skip_cnt > 0, "interpolator skip");
    check(n_first > 0, "SPS first stage");
    check(n_restart > 0, "SPS restart");
    check(n_confirm > 0, "SPS confirm");
    check(locked_seen && sps_lock, "SPS lock");
    check(pf_bank_valid != '0, "pre-fill banks");
    check(n_dm > 0, "demapper output");
    check(!ebuf_overflow, "no overflow in normal flow");
    // hold the FFT input while samples keep coming
    ce_ready = 0;
    for (int m = 0; m < 800; m++) begin
      @(negedge clk) rx_valid = 1;
      @(negedge clk) rx_valid = 0;
      repeat (2) @(negedge clk);
    end
    check(ebuf_overflow, "elastic buffer overflow");
    ce_ready = 1;
  endtask

  initial begin
    run(PPM);
    run(-PPM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
