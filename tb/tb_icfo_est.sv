// tb_icfo_est: self-checking test of the integer CFO estimator. Symbols
// of random QPSK data with boosted continual and scattered pilots are
// shifted by s carrier spacings (s from -S to S) inside the widened bin
// range; the estimate must equal s. 2K mode for all shifts, plus 8K mode
// for two shifts. The estimate must appear one cycle after sym_end.
module tb_icfo_est;
  import dvbt_pkg::*;
  localparam int S = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fft_mode_e mode = MODE_2K;
  logic sym_start = 0, in_valid = 0, sym_end = 0, est_valid;
  cplx_t in_data = '0;
  logic signed [7:0] icfo;
  int checks = 0, failures = 0;

  icfo_est #(.S(S)) dut (.*);

  int cp2k [45] = '{0, 48, 54, 87, 141, 156, 192, 201, 255, 279, 282, 333, 432, 450,
    483, 525, 531, 618, 636, 714, 759, 765, 780, 804, 873, 888, 918, 939, 942, 969,
    984, 1050, 1101, 1107, 1110, 1137, 1140, 1146, 1206, 1269, 1323, 1377, 1491,
    1683, 1704};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic symbol(input fft_mode_e m, input int s, input int l);
    int K;
    bit is_cp [6817];
    K = (m == MODE_2K) ? 1705 : 6817;
    foreach (is_cp[k]) is_cp[k] = 0;
    for (int r = 0; r < 4; r++) foreach (cp2k[i]) if (cp2k[i] + 1704 * r < K) is_cp[cp2k[i] + 1704 * r] = 1;
    mode = m;
    @(negedge clk) sym_start = 1;
    @(negedge clk) sym_start = 0;
    for (int j = 0; j < K + 2 * S; j++) begin
      int k;
      k = j - S - s;
      in_valid = 1;
      if (k < 0 || k >= K) begin
        in_data.re = SW'($signed($urandom_range(40)) - 20); in_data.im = SW'($signed($urandom_range(40)) - 20);
      end else if (is_cp[k] || k % 12 == 3 * (l % 4)) begin
        in_data.re = ($urandom_range(1)) ? SW'(1333) : -SW'(1333); in_data.im = '0;
      end else begin
        in_data.re = ($urandom_range(1)) ? SW'(707) : -SW'(707);
        in_data.im = ($urandom_range(1)) ? SW'(707) : -SW'(707);
      end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk) sym_end = 1;
    @(negedge clk) sym_end = 0;
    checks++;
    if (!est_valid || int'(icfo) != s) begin
      failures++;
      $display("mode %0d shift %0d: estimate %0d (valid %b)", m, s, icfo, est_valid);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = -S; s <= S; s++) symbol(MODE_2K, s, s + 20);
    symbol(MODE_8K, 5, 1);
    symbol(MODE_8K, -3, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
