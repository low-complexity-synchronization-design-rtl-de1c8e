// tb_interp_ctrl: self-checking test of the interpolator controller.
// Input windows arrive every fourth cycle (1x rate on a 4x clock) in
// symbols of NU useful windows after 2^G guard-interval windows. For each
// requested output the testbench records its time, window index plus mu.
// Consecutive outputs of a symbol must be 1+delta apart, and the first
// output after a guard interval must lie (1+delta)*(2^G+1) after the last
// one before it, showing that the GI prediction keeps the timing phase
// continuous. mu must stay within [-0.5-|delta|, 0.5+|delta|]. Runs with a
// positive and a negative drift and requires both skips and doubles.
module tb_interp_ctrl;
  localparam int AW = 24, MUW = 12, NU = 200, G = 4, NSYM = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic win_valid = 0, gi = 0, predict = 0;
  logic [3:0] gi_log2 = 4'(G);
  logic signed [AW-1:0] delta;
  logic calc;
  logic signed [MUW-1:0] mu;
  logic [15:0] skip_cnt, double_cnt;
  int checks = 0, failures = 0;

  interp_ctrl #(.AW(AW), .MUW(MUW)) dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int win_idx = 0;
  real last_t, d_real, tol;
  logic have_last = 0;
  int gap_windows = 1;   // windows between consecutive outputs
  int n_out = 0;
  always @(posedge clk) if (calc) begin
    real t, expect_dt, m;
    n_out++;
    m = real'(mu) / real'(1 << (MUW - 1));
    t = real'(win_idx) + m;
    checks++;
    if (m > 0.5 + 0.02 || m < -0.5 - 0.02) begin
      failures++; $display("mu %f out of range", m);
    end
    if (have_last) begin
      expect_dt = (1.0 + d_real) * real'(gap_windows);
      checks++;
      if (t - last_t - expect_dt > tol || last_t + expect_dt - t > tol) begin
        failures++;
        $display("output at %f, previous %f, expected spacing %f", t, last_t, expect_dt);
      end
    end
    have_last = 1;
    last_t = t;
    gap_windows = 1;
  end

  task automatic run(input int dlt);
    delta = AW'(dlt);
    d_real = real'(dlt) / real'(1 << (AW - 1));
    tol = 3.0 / real'(1 << (MUW - 1));
    have_last = 0;
    n_out = 0;
    for (int s = 0; s < NSYM; s++) begin
      for (int i = 0; i < (1 << G) + NU; i++) begin
        @(negedge clk);
        win_valid = 1;
        gi = (i < (1 << G));
        predict = (s > 0) && (i == (1 << G) - 1);
        win_idx++;
        @(negedge clk) win_valid = 0; predict = 0;
        repeat (2) @(negedge clk);
      end
      gap_windows = (1 << G) + 1;
    end
    // outputs produced: NU per symbol stretched by 1/(1+delta)
    checks++;
    if (real'(n_out) > real'(NSYM * NU) / (1.0 + d_real) + 2.0 * NSYM ||
        real'(n_out) < real'(NSYM * NU) / (1.0 + d_real) - 2.0 * NSYM) begin
      failures++;
      $display("%0d outputs for delta %f", n_out, d_real);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(60000);     // +0.72 % of a sample per output
    checks++;
    if (skip_cnt == 0) begin failures++; $display("no skip"); end
    run(-70000);
    checks++;
    if (double_cnt == 0) begin failures++; $display("no double"); end
    $display("skips %0d doubles %0d", skip_cnt, double_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
