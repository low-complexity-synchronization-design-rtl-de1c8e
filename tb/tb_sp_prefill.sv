// tb_sp_prefill: self-checking test of the scattered pilot pre-filling
// storage. The synchronization stages are driven directly. Each carrier
// carries its own index (re) and symbol number (im), so every stored word
// shows where it came from. Sequence: 1st SPS on symbol 1 (all four
// groups stored), 2nd SPS on symbol 2 (predicted group 0 stored in bank
// 4, the one after the detected group 3), confirmation: exactly the banks
// with SP(1,3) and SP(2,0) must remain, with the right contents. With
// detected group 0 the 2nd SPS symbol must go to bank 1. Then a 1st/2nd SPS pair ending in
// a restart must discard everything, and after a new confirmation locked
// symbols must fill free banks first and then replace the oldest.
module tb_sp_prefill;
  import dvbt_pkg::*;
  localparam int NBANK = 6, DEPTH = 569, K = 1705;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sym_start = 0, sc_valid = 0, sym_end = 0, confirm = 0, restart = 0;
  cplx_t sc_data = '0, rd_data;
  sps_state_e sps_state = SPS_IDLE;
  logic [1:0] pred_mode = '0, cur_mode = '0, first_mode = '0;
  logic [NBANK-1:0] bank_valid;
  logic [1:0] bank_group [NBANK];
  logic [7:0] bank_sym [NBANK];
  logic [7:0] sym_no;
  logic [2:0] rd_bank = '0;
  logic [9:0] rd_addr = '0;
  int checks = 0, failures = 0;

  sp_prefill #(.NBANK(NBANK), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic symbol(input sps_state_e st, input int l);
    sps_state = st;
    @(negedge clk) sym_start = 1;
    @(negedge clk) sym_start = 0;
    for (int k = 0; k < K; k++) begin
      sc_valid = 1;
      sc_data.re = SW'(k); sc_data.im = SW'(l);
      @(negedge clk);
    end
    sc_valid = 0;
    @(negedge clk) sym_end = 1;
    @(negedge clk) sym_end = 0;
  endtask

  task automatic outcome(input bit ok, input logic [1:0] m1);
    @(negedge clk);
    confirm = ok; restart = !ok; first_mode = m1;
    @(negedge clk) confirm = 0; restart = 0;
    @(negedge clk);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bank b must hold group g of symbol l (sym_no counts from 1)
  task automatic check_bank(input int b, input int g, input int l);
    int bad = 0;
    check(bank_valid[b] && bank_group[b] == 2'(g) && bank_sym[b] == 8'(l),
          $sformatf("bank %0d tag (valid %b group %0d sym %0d)", b, bank_valid[b], bank_group[b], bank_sym[b]));
    for (int p = 0; 12 * p + 3 * g < K; p++) begin
      @(negedge clk) rd_bank = 3'(b); rd_addr = 10'(p);
      @(negedge clk);
      if (rd_data.re != SW'(12 * p + 3 * g) || rd_data.im != SW'(l)) bad++;
    end
    check(bad == 0, $sformatf("bank %0d contents, %0d wrong words", b, bad));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pre-fill, confirmed with mode 3 on symbol 1
    symbol(SPS_FIRST, 1);
    check(bank_valid == 6'b001111, "four groups after 1st SPS");
    for (int g = 0; g < 4; g++) check_bank(g, g, 1);
    first_mode = 2'd3; pred_mode = 2'd0;
    symbol(SPS_SECOND, 2);
    outcome(1, 2'd3);
    check(bank_valid == 6'b011000, "SP(1,3) and SP(2,0) kept");
    check_bank(3, 3, 1);
    check_bank(4, 0, 2);
    // restart discards the pre-filled pilots
    symbol(SPS_FIRST, 3);
    first_mode = 2'd0; pred_mode = 2'd1;
    symbol(SPS_SECOND, 4);
    outcome(0, 2'd0);
    check(bank_valid == '0, "all discarded after restart");
    // new pre-fill with mode 0, then locked symbols
    symbol(SPS_FIRST, 5);
    first_mode = 2'd0; pred_mode = 2'd1;
    symbol(SPS_SECOND, 6);
    outcome(1, 2'd0);
    check(bank_valid == 6'b000011, "SP(5,0) and SP(6,1) kept in banks 0 and 1");
    check_bank(1, 1, 6);
    for (int l = 7; l < 12; l++) begin
      cur_mode = 2'(l % 4);
      symbol(SPS_LOCKED, l);
    end
    // free banks 2..5 took symbols 7..10; symbol 11 replaced symbol 5
    check_bank(2, 3, 7);
    check_bank(3, 0, 8);
    check_bank(4, 1, 9);
    check_bank(5, 2, 10);
    check_bank(0, 3, 11);
    check_bank(1, 1, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
