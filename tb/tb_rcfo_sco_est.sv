// tb_rcfo_sco_est: self-checking test of the joint RCFO/SCO estimator.
// Symbols of 45 continual pilots (2K mode positions) are generated with a
// common phase step alpha per symbol (residual CFO) and a phase step
// beta*(k-852) growing with the carrier index k (SCO), plus random
// per-pilot start phases. The reference angles of the lower- and
// upper-half correlation sums are computed from the same quantized pilot
// values in floating point; rcfo_err and sco_err must match their sum and
// difference within 3 LSB. The first symbol after start must give no
// estimate, and the estimate must come within 40 cycles of sym_end.
module tb_rcfo_sco_est;
  import dvbt_pkg::*;
  localparam int NCP = 45, PW = 16, AW = 34;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, sym_start = 0, cp_valid = 0, cp_upper = 0, sym_end = 0;
  cplx_t cp_data = '0;
  logic est_valid;
  logic signed [PW:0] rcfo_err, sco_err;
  int checks = 0, failures = 0;

  rcfo_sco_est #(.NCP(NCP), .PW(PW), .AW(AW)) dut (.*);

  int pos [45] = '{0, 48, 54, 87, 141, 156, 192, 201, 255, 279, 282, 333, 432, 450,
    483, 525, 531, 618, 636, 714, 759, 765, 780, 804, 873, 888, 918, 939, 942, 969,
    984, 1050, 1101, 1107, 1110, 1137, 1140, 1146, 1206, 1269, 1323, 1377, 1491,
    1683, 1704};
  real th0 [45];
  int pre [45], pim [45];
  int n_est = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (est_valid) n_est++;

  task automatic symbol(input int l, input real alpha, input real beta, input bit expect_est);
    real sr [2], si [2], phl, phu, er, es, d;
    int cyc;
    int n0;
    sr = '{0.0, 0.0}; si = '{0.0, 0.0};
    n0 = n_est;
    @(negedge clk) sym_start = 1;
    @(negedge clk) sym_start = 0;
    for (int i = 0; i < NCP; i++) begin
      real th;
      int h, cr, ci;
      th = th0[i] + real'(l) * (alpha + beta * real'(pos[i] - 852));
      cr = int'(1500.0 * $cos(th)); ci = int'(1500.0 * $sin(th));
      h = (pos[i] > 852) ? 1 : 0;
      if (l > 0) begin
        sr[h] += real'(cr) * real'(pre[i]) + real'(ci) * real'(pim[i]);
        si[h] += real'(ci) * real'(pre[i]) - real'(cr) * real'(pim[i]);
      end
      pre[i] = cr; pim[i] = ci;
      @(negedge clk);
      cp_valid = 1; cp_upper = h[0];
      cp_data.re = SW'(cr); cp_data.im = SW'(ci);
      @(negedge clk) cp_valid = 0;
    end
    @(negedge clk) sym_end = 1;
    @(negedge clk) sym_end = 0;
    cyc = 0;
    while (n_est == n0 && cyc < 60) begin @(negedge clk); cyc++; end
    checks++;
    if (!expect_est) begin
      if (n_est != n0) begin failures++; $display("estimate without previous symbol"); end
      return;
    end
    if (n_est == n0 || cyc > 40) begin failures++; $display("no estimate (%0d cycles)", cyc); return; end
    phl = $atan2(si[0], sr[0]) / (2.0 * PI) * 65536.0;
    phu = $atan2(si[1], sr[1]) / (2.0 * PI) * 65536.0;
    er = phu + phl; es = phu - phl;
    checks++;
    d = real'(rcfo_err) - er;
    if (d > 3.0 || d < -3.0) begin failures++; $display("rcfo %0d expected %f", rcfo_err, er); end
    checks++;
    d = real'(sco_err) - es;
    if (d > 3.0 || d < -3.0) begin failures++; $display("sco %0d expected %f", sco_err, es); end
  endtask

  initial begin
    for (int i = 0; i < NCP; i++) th0[i] = 2.0 * PI * real'($urandom_range(1000)) / 1000.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    symbol(0, 0.3, 0.0, 0);
    for (int l = 1; l < 6; l++) symbol(l, 0.3, 0.0, 1);        // RCFO only
    for (int l = 6; l < 12; l++) symbol(l, 0.0, 0.0002, 1);    // SCO only
    for (int l = 12; l < 20; l++) symbol(l, -0.2, -0.0003, 1); // both
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
