// tb_cp_pos_gen: self-checking test of the differential continual pilot
// position generator. The reference is the list of the 45 continual pilot
// carriers of 2K mode; 4K and 8K mode repeat it every 1704 carriers
// (89 and 177 pilots). Every position, the pilot count and the last flag
// are checked in all three modes, stepping with and without gaps.
module tb_cp_pos_gen;
  import dvbt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, next = 0, valid, last;
  fft_mode_e mode = MODE_2K;
  logic [CIW-1:0] pos;
  logic [7:0] index;
  int checks = 0, failures = 0;

  cp_pos_gen dut (.*);

  int ref2k [45] = '{0, 48, 54, 87, 141, 156, 192, 201, 255, 279, 282, 333, 432, 450,
    483, 525, 531, 618, 636, 714, 759, 765, 780, 804, 873, 888, 918, 939, 942, 969,
    984, 1050, 1101, 1107, 1110, 1137, 1140, 1146, 1206, 1269, 1323, 1377, 1491,
    1683, 1704};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      int n, cnt;
      n = (m == 0) ? 45 : (m == 1) ? 89 : 177;
      @(negedge clk);
      mode = fft_mode_e'(m); start = 1;
      @(negedge clk) start = 0;
      cnt = 0;
      while (valid) begin
        int expv;
        expv = (cnt == n - 1) ? 1704 * (n - 1) / 44 : ref2k[cnt % 44] + 1704 * (cnt / 44);
        checks++;
        if (int'(pos) != expv || int'(index) != cnt || last != (cnt == n - 1)) begin
          failures++;
          $display("mode %0d pilot %0d: pos %0d expected %0d last %b", m, cnt, pos, expv, last);
        end
        cnt++;
        if (cnt > 200) break;
        next = 1;
        @(negedge clk);
        next = 0;
        if (cnt % 5 == 0) @(negedge clk);
      end
      checks++;
      if (cnt != n) begin failures++; $display("mode %0d: %0d pilots", m, cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
