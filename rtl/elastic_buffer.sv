// elastic_buffer: first-in first-out buffer between the derotator and the
// FFT.
//
// The interpolator delivers samples at an irregular rate: normally one per
// input sample, none when the controller skips a sample set and two when
// it doubles one. The FFT wants a steady flow of symbols, so a small FIFO
// absorbs the difference. The document names the elastic buffer but
// gives no size or interface; this is a plain synchronous FIFO of DEPTH
// entries holding a sample and its symbol-start flag, both clocked by the
// 4x clock.
//
// Interface: push/push_data/push_sof, pop/pop_data/pop_sof (data valid
// while not empty, show-ahead), full, empty, level. A push when full is
// dropped and sets the sticky overflow flag; a pop when empty is ignored.
module elastic_buffer
  import dvbt_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  cplx_t                    push_data,
  input  logic                     push_sof,
  input  logic                     pop,
  output cplx_t                    pop_data,
  output logic                     pop_sof,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level,
  output logic                     overflow
);
  localparam int PW = $clog2(DEPTH);

  typedef struct packed {
    logic  sof;
    cplx_t d;
  } entry_t;

  entry_t        mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign full     = (level == (PW+1)'(DEPTH));
  assign empty    = (level == '0);
  assign do_push  = push && !full;
  assign do_pop   = pop && !empty;
  assign pop_data = mem[rp].d;
  assign pop_sof  = mem[rp].sof;

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= '{sof: push_sof, d: push_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (PW+1)'(do_push) - (PW+1)'(do_pop);
      if (push && full) overflow <= 1'b1;
    end
  end

  // the level never exceeds the capacity
  a_level: assert property (@(posedge clk) disable iff (!rst_n) level <= (PW+1)'(DEPTH));

endmodule
