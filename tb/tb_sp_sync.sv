// tb_sp_sync: self-checking test of the two-stage PB-PB scattered pilot
// synchronization. 2K-mode symbols (1705 carriers) are generated with
// random QPSK data, continual pilots and scattered pilots on carriers
// 3*(l mod 4) + 12p, pilots boosted to 4/3 amplitude. Case 1: two
// consecutive symbols must lock in 2 symbols with the right modes, and the
// mode must then follow the symbol number. Case 2: the symbol after the
// 1st SPS is replaced by one with a different pattern (a detection error
// as seen by the 2nd SPS); the scheme must restart and lock after 4
// symbols in all (the latencies of the PB-PB scheme).
module tb_sp_sync;
  import dvbt_pkg::*;
  localparam int K = 1705;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, sym_start = 0, sc_valid = 0, sym_end = 0;
  cplx_t sc_data = '0;
  sps_state_e state;
  logic [1:0] first_mode, pred_mode, detected_mode, cur_mode;
  logic first_done, confirm, restart;
  logic [7:0] sync_syms;
  int checks = 0, failures = 0;
  int n_confirm = 0, n_restart = 0, n_first = 0;

  sp_sync dut (.*);

  int cps [45] = '{0, 48, 54, 87, 141, 156, 192, 201, 255, 279, 282, 333, 432, 450,
    483, 525, 531, 618, 636, 714, 759, 765, 780, 804, 873, 888, 918, 939, 942, 969,
    984, 1050, 1101, 1107, 1110, 1137, 1140, 1146, 1206, 1269, 1323, 1377, 1491,
    1683, 1704};

  always @(posedge clk) if (rst_n) begin
    if (confirm) n_confirm++;
    if (restart) n_restart++;
    if (first_done) n_first++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic symbol(input int l);
    bit is_cp [K];
    foreach (is_cp[k]) is_cp[k] = 0;
    foreach (cps[i]) is_cp[cps[i]] = 1;
    @(negedge clk) sym_start = 1;
    @(negedge clk) sym_start = 0;
    for (int k = 0; k < K; k++) begin
      sc_valid = 1;
      if (is_cp[k] || (k % 12 == 3 * (l % 4))) begin
        sc_data.re = ($urandom_range(1)) ? SW'(1333) : -SW'(1333);
        sc_data.im = '0;
      end else begin
        sc_data.re = ($urandom_range(1)) ? SW'(707) : -SW'(707);
        sc_data.im = ($urandom_range(1)) ? SW'(707) : -SW'(707);
      end
      @(negedge clk);
    end
    sc_valid = 0;
    @(negedge clk) sym_end = 1;
    @(negedge clk) sym_end = 0;
    @(negedge clk);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // case 1: no error
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(state == SPS_FIRST, "first stage after start");
    symbol(5);
    check(state == SPS_SECOND && first_mode == 2'd1 && pred_mode == 2'd2, "1st SPS mode");
    symbol(6);
    check(state == SPS_LOCKED && detected_mode == 2'd2, "locked after 2nd SPS");
    check(sync_syms == 8'd2, "latency 2 symbols without error");
    check(n_confirm == 1 && n_restart == 0, "one confirmation");
    for (int l = 7; l < 10; l++) begin
      check(cur_mode == 2'(l % 4), "mode follows symbol number");
      symbol(l);
    end
    // case 2: the symbol seen by the 2nd SPS does not follow the first
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    symbol(10);
    check(pred_mode == 2'd3, "prediction");
    symbol(13);
    check(state == SPS_FIRST && n_restart == 1, "restart after mismatch");
    symbol(14);
    symbol(15);
    check(state == SPS_LOCKED && cur_mode == 2'd0, "locked after restart");
    check(sync_syms == 8'd4, "latency 4 symbols with one error");
    check(n_first == 3 && n_confirm == 2, "event counts");
    $display("1st SPS %0d, confirmations %0d, restarts %0d", n_first, n_confirm, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
