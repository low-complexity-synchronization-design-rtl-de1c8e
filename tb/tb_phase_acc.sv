// tb_phase_acc: self-checking test of the NCO phase accumulator with GI
// phase prediction. Symbols of NU useful samples are separated by guard
// intervals of 2^G samples during which the accumulator is idle; a
// predict pulse with the first useful sample adds freq << G. Every phase
// the accumulator presents for a useful sample must equal that of an
// ideal accumulator advancing on every sample, GI included (phase
// continuity). The operation count must be NU per symbol instead of
// NU + 2^G.
module tb_phase_acc;
  localparam int AW = 24, PW = 16, NU = 256, NSYM = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, en = 0, predict = 0;
  logic [AW-1:0] load_val = '0;
  logic [3:0] gi_log2;
  logic signed [AW-1:0] freq;
  logic [PW-1:0] phase;
  logic [31:0] op_count;
  int checks = 0, failures = 0;

  phase_acc #(.AW(AW), .PW(PW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW-1:0] ideal;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 3; g <= 6; g++) begin
      int ops0;
      gi_log2 = 4'(g);
      freq = AW'($signed($urandom_range(200000)) - 100000);
      @(negedge clk) load = 1; load_val = AW'($urandom);
      ideal = load_val;
      @(negedge clk) load = 0;
      ops0 = int'(op_count);
      for (int s = 0; s < NSYM; s++) begin
        // guard interval: ideal accumulator runs, the NCO does not
        if (s > 0) for (int i = 0; i < (1 << g); i++) ideal += AW'(freq);
        for (int i = 0; i < NU; i++) begin
          @(negedge clk);
          en = 1; predict = (s > 0 && i == 0);
          #1;
          checks++;
          if (phase != ideal[AW-1 -: PW]) begin
            failures++;
            $display("g=%0d sym %0d sample %0d: phase %0h ideal %0h", g, s, i, phase, ideal[AW-1 -: PW]);
          end
          ideal += AW'(freq);
        end
        @(negedge clk) en = 0; predict = 0;
        repeat (2) @(negedge clk);
      end
      checks++;
      if (int'(op_count) - ops0 != NU * NSYM) begin
        failures++;
        $display("operation count %0d, expected %0d", int'(op_count) - ops0, NU * NSYM);
      end
      $display("GI 2^%0d: %0d accumulator operations instead of %0d", g, NU * NSYM, NU * NSYM + (NSYM - 1) * (1 << g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
