// tb_elastic_buffer: self-checking test of the elastic FIFO. Random pushes
// and pops are compared against a queue model: popped data and flags,
// level, full and empty every cycle. A burst of pushes into a full buffer
// must set overflow and lose nothing already stored.
module tb_elastic_buffer;
  import dvbt_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, push_sof = 0, pop = 0, pop_sof, full, empty, overflow;
  cplx_t push_data = '0, pop_data;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;

  elastic_buffer #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2*SW:0] q [$];
  task automatic step(input bit pu, input bit po);
    @(negedge clk);
    push = pu; pop = po;
    push_data.re = SW'($urandom); push_data.im = SW'($urandom); push_sof = 1'($urandom);
    // check the show-ahead output and status before the edge
    checks++;
    if (int'(level) != q.size() || empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
      failures++; $display("level %0d model %0d", level, q.size());
    end
    if (po && q.size() > 0) begin
      checks++;
      if ({pop_sof, pop_data} != q[0]) begin failures++; $display("pop data mismatch"); end
    end
    @(posedge clk);
    begin
      bit was_full;
      was_full = (q.size() == DEPTH);
      if (po && q.size() > 0) void'(q.pop_front());
      if (pu && !was_full) q.push_back({push_sof, push_data});
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) step(1'($urandom_range(99) < 55) && q.size() < DEPTH, 1'($urandom_range(99) < 50));
    // drain, then overflow
    while (q.size() > 0) step(0, 1);
    checks++;
    if (overflow) begin failures++; $display("overflow without cause"); end
    for (int i = 0; i < DEPTH + 4; i++) step(1, 0);
    checks++;
    if (!overflow || !full) begin failures++; $display("overflow not flagged"); end
    while (q.size() > 0) step(0, 1);
    step(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
