// interp_ctrl: controller of the cubic Lagrange interpolator (sampling
// clock offset compensation).
//
// The controller keeps mu, the fractional position of the next output
// sample relative to the centre sample of the interpolator's current
// four-sample window, in the valid range [-0.5, 0.5) of a sample. Every
// output advances mu by delta, the per-sample timing drift from the SCO
// loop. The signed AW-bit accumulator spans [-1, 1) sample, so mu is in
// the valid range exactly when its two top bits are equal; only those two
// bits are compared, as the document proposes:
//   01 (mu >= 0.5): the next output lies nearer the following window:
//       mu -= 1 and the next input window produces no output (skip);
//   10 (mu < -0.5): the next output still lies in the current window:
//       mu += 1 and a second output is computed from it in the next cycle
//       (double). The 4x clock leaves room for this extra cycle.
// Guard-interval windows (gi high) produce no output and leave mu alone.
// With the last GI window (gi and predict high) mu gets the predicted drift
// of the whole GI, delta << log2(N_GI), in one addition, so the
// accumulator need not run during the GI (phase prediction). Should that
// push mu below -0.5, the first useful output is computed from this last
// GI window.
//
// Interface: win_valid marks a new input window (at most every second
// cycle); calc/mu tell the interpolator to compute an output with that mu.
// skip_cnt/double_cnt count sample-set changes. Widths are this design's
// choices; |delta << log2(N_GI)| is assumed below half a sample.
module interp_ctrl #(
  parameter int AW  = 24,  // accumulator width, 2^(AW-1) = one sample
  parameter int MUW = 12   // mu output width, 2^(MUW-1) = one sample
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  win_valid,
  input  logic                  gi,
  input  logic                  predict,
  input  logic [3:0]            gi_log2,
  input  logic signed [AW-1:0]  delta,
  output logic                  calc,
  output logic signed [MUW-1:0] mu,
  output logic [15:0]           skip_cnt,
  output logic [15:0]           double_cnt
);
  typedef enum logic [1:0] {S_NORMAL, S_SKIP, S_DOUBLE} state_e;
  state_e state;
  logic signed [AW-1:0] acc;

  // One sample is 2^(AW-1); adding or subtracting it modulo 2^AW is the
  // same operation, an inversion of the top bit.
  localparam logic signed [AW-1:0] ONE_SAMPLE = {1'b1, {(AW-1){1'b0}}};

  logic signed [AW-1:0] pred, base, chk;
  logic                 do_out, do_chk;
  logic signed [AW-1:0] out_mu;
  logic                 pred_under;

  assign pred_under = (state != S_DOUBLE) && win_valid && gi && predict &&
                      (pred[AW-1 -: 2] == 2'b10);

  assign pred = acc + (delta <<< gi_log2);  // GI drift added in one step

  // Decide, for this cycle, whether an output is computed (do_out, with
  // out_mu) and which new mu value must be range checked (chk).
  always_comb begin
    do_out = 1'b0;
    do_chk = 1'b0;
    out_mu = acc;
    base   = acc;
    if (state == S_DOUBLE) begin
      do_out = 1'b1;
      do_chk = 1'b1;
      base   = acc;
    end else if (win_valid && gi && predict) begin
      // last GI window: apply the predicted drift. Underflow means the
      // first useful output falls in this very window.
      if (pred[AW-1 -: 2] == 2'b10) begin
        do_out = 1'b1;
        out_mu = pred ^ ONE_SAMPLE;
        do_chk = 1'b1;
        base   = pred ^ ONE_SAMPLE;
      end else begin
        do_chk = 1'b0;
      end
    end else if (win_valid && !gi && state == S_NORMAL) begin
      do_out = 1'b1;
      do_chk = 1'b1;
      base   = acc;
    end
    chk = base + delta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_NORMAL;
      acc        <= '0;
      calc       <= 1'b0;
      mu         <= '0;
      skip_cnt   <= '0;
      double_cnt <= '0;
    end else begin
      calc <= do_out;
      if (do_out) mu <= out_mu[AW-1 -: MUW];
      if (do_chk) begin
        // the two-bit range comparator
        unique case (chk[AW-1 -: 2])
          2'b01: begin
            acc <= chk ^ ONE_SAMPLE; state <= S_SKIP;
            skip_cnt <= skip_cnt + 1;
          end
          2'b10: begin
            acc <= chk ^ ONE_SAMPLE; state <= S_DOUBLE;
            double_cnt <= double_cnt + (pred_under ? 16'd2 : 16'd1);
          end
          default: begin acc <= chk; state <= S_NORMAL; end
        endcase
        if (pred_under) double_cnt <= double_cnt + 1;
      end else if (win_valid && gi && predict) begin
        if (pred[AW-1 -: 2] == 2'b01) begin
          acc <= pred ^ ONE_SAMPLE; state <= S_SKIP;
          skip_cnt <= skip_cnt + 1;
        end else begin
          acc <= pred;
        end
      end else if (win_valid && !gi && state == S_SKIP) begin
        state <= S_NORMAL;
      end
    end
  end

endmodule
