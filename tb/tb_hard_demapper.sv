// tb_hard_demapper: self-checking test of the hard demapper. Random
// constellation points of QPSK, 16-QAM and 64-QAM plus noise below half a
// level spacing are demapped; the expected bits come from a nearest-level
// search and the DVB-T/H Gray tables written out per level.
module tb_hard_demapper;
  import dvbt_pkg::*;
  localparam int UNIT = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  cplx_t in_data = '0;
  logic [1:0] qam = '0;
  logic [5:0] bits;
  logic [2:0] nbits;
  int checks = 0, failures = 0;

  hard_demapper #(.UNIT(UNIT)) dut (.*);

  // per-axis bit patterns, index = level from the most positive
  // 64-QAM levels 7,5,3,1,-1,-3,-5,-7 -> (y0,y2,y4)
  int t64 [8] = '{3'b000, 3'b001, 3'b011, 3'b010, 3'b110, 3'b111, 3'b101, 3'b100};
  // 16-QAM levels 3,1,-1,-3 -> (y0,y2)
  int t16 [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      int m, lv, li, lq, nr, ni, pr, pi;
      logic [5:0] e;
      m = i % 3;
      lv = (m == 0) ? 2 : (m == 1) ? 4 : 8;
      li = $urandom_range(lv - 1); lq = $urandom_range(lv - 1);
      pr = (lv - 1 - 2 * li) * UNIT; pi = (lv - 1 - 2 * lq) * UNIT;
      nr = $signed($urandom_range(2 * UNIT - 2)) - (UNIT - 1);
      ni = $signed($urandom_range(2 * UNIT - 2)) - (UNIT - 1);
      e = '0;
      case (m)
        0: begin e[0] = li[0]; e[1] = lq[0]; end
        1: begin e[0] = t16[li][1]; e[2] = t16[li][0]; e[1] = t16[lq][1]; e[3] = t16[lq][0]; end
        default: begin
          e[0] = t64[li][2]; e[2] = t64[li][1]; e[4] = t64[li][0];
          e[1] = t64[lq][2]; e[3] = t64[lq][1]; e[5] = t64[lq][0];
        end
      endcase
      @(negedge clk);
      in_valid = 1; qam = 2'(m);
      in_data.re = SW'(pr + nr); in_data.im = SW'(pi + ni);
      @(negedge clk) in_valid = 0;
      checks++;
      if (!out_valid || bits != e || int'(nbits) != 2 * (m + 1)) begin
        failures++;
        $display("qam %0d point (%0d,%0d): bits %b expected %b", m, pr + nr, pi + ni, bits, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
