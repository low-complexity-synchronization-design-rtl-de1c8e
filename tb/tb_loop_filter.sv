// tb_loop_filter: self-checking test of the PI loop filter.
// Random error samples (with gaps) are filtered; each output is compared
// with y[n] = C1*x[n] + C2*sum(x[0..n-1]) computed in the testbench in the
// output's fixed-point unit. Checks the one-cycle latency, the clear
// input and saturation of the integrator.
module tb_loop_filter;
  localparam int IW = 16, OW = 28, C1SH = 1, C2SH = 4, FB = C2SH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_valid = 0, out_valid;
  logic signed [IW-1:0] in_err = '0;
  logic signed [OW-1:0] out_ctrl;
  int checks = 0, failures = 0;

  loop_filter #(.IW(IW), .OW(OW), .C1SH(C1SH), .C2SH(C2SH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sum, expv;
  task automatic apply(input int x);
    @(negedge clk);
    in_valid = 1; in_err = IW'(x);
    expv = (longint'(x) <<< (FB - C1SH)) + (sum <<< (FB - C2SH));
    if (expv > (64'sd1 <<< (OW-1)) - 1) expv = (64'sd1 <<< (OW-1)) - 1;
    if (expv < -(64'sd1 <<< (OW-1))) expv = -(64'sd1 <<< (OW-1));
    sum += x;
    if (sum > (64'sd1 <<< (OW-1-FB+C2SH)) - 1) sum = (64'sd1 <<< (OW-1-FB+C2SH)) - 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || longint'(out_ctrl) != expv) begin
      failures++;
      $display("x=%0d got %0d (valid %b) expected %0d", x, out_ctrl, out_valid, expv);
    end
  endtask

  initial begin
    sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      apply($signed($urandom_range(20000)) - 10000);
      if (k % 7 == 0) repeat ($urandom_range(3)) @(posedge clk);
    end
    // clear empties the integrator
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    sum = 0;
    for (int k = 0; k < 50; k++) apply($signed($urandom_range(2000)) - 1000);
    // drive the integrator into saturation
    for (int k = 0; k < 700; k++) apply(32000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
