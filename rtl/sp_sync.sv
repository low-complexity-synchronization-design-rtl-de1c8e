// sp_sync: two-stage power-based (PB-PB) scattered pilot synchronization.
//
// A DVB-T/H symbol l carries scattered pilots on carriers 3*(l mod 4) +
// 12p, sent with boosted power. The power-based detector accumulates
// |Y(k)|^2 = re^2 + im^2 (two real multipliers and an adder) over the
// carriers of each of the four candidate groups k = 3g + 12p into four
// register groups, and at the end of the symbol takes the group with the
// largest sum as the symbol's SP mode.
//
// Two-stage scheme: the 1st SPS detects the mode m1 of one symbol and so
// predicts (m1+1) mod 4 for the next; the 2nd SPS detects the mode of that
// next symbol. If both agree the mode is confirmed (locked) and it steps by
// one every symbol from then on; otherwise the scheme restarts with a new
// 1st SPS on the following symbol. Synchronization thus takes two symbols
// without error and four with one detection error.
//
// Interface: start (between symbols) begins synchronization; per symbol,
// sym_start, then the carriers k = 0..K-1 in order (sc_valid/sc_data),
// then sym_end. state is the stage in which the next symbol will be
// processed and changes one cycle after sym_end, together with the pulses
// first_done, confirm and restart. pred_mode is valid in SPS_SECOND and
// cur_mode, the SP mode of the symbol being received, in SPS_LOCKED.
// sync_syms counts the symbols used since start until lock.
// The document gives the PB metric and the two-stage state diagram; the
// accumulator widths and this handshake are this design's.
module sp_sync
  import dvbt_pkg::*;
#(
  parameter int ACW = 36     // accumulator (register group) width
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        sym_start,
  input  logic        sc_valid,
  input  cplx_t       sc_data,
  input  logic        sym_end,
  output sps_state_e  state,
  output logic [1:0]  first_mode,
  output logic [1:0]  pred_mode,
  output logic [1:0]  detected_mode,
  output logic [1:0]  cur_mode,
  output logic        first_done,
  output logic        confirm,
  output logic        restart,
  output logic [7:0]  sync_syms
);
  logic [3:0]           c12;          // carrier index mod 12
  logic [ACW-1:0]       acc [4];      // the four register groups
  logic [2*SW:0]        pwr;
  logic [1:0]           best;
  sps_state_e           cur_stage;    // stage of the symbol being received

  assign pwr = (2*SW+1)'(sc_data.re * sc_data.re) + (2*SW+1)'(sc_data.im * sc_data.im);

  // arg max over the four register groups
  always_comb begin
    best = 2'd0;
    for (int g = 1; g < 4; g++)
      if (acc[g] > acc[best]) best = 2'(g);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c12 <= '0;
      for (int g = 0; g < 4; g++) acc[g] <= '0;
    end else if (sym_start) begin
      c12 <= '0;
      for (int g = 0; g < 4; g++) acc[g] <= '0;
    end else if (sc_valid) begin
      c12 <= (c12 == 4'd11) ? 4'd0 : c12 + 4'd1;
      unique case (c12)
        4'd0: acc[0] <= acc[0] + ACW'(pwr);
        4'd3: acc[1] <= acc[1] + ACW'(pwr);
        4'd6: acc[2] <= acc[2] + ACW'(pwr);
        4'd9: acc[3] <= acc[3] + ACW'(pwr);
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= SPS_IDLE;
      cur_stage     <= SPS_IDLE;
      first_mode    <= '0;
      pred_mode     <= '0;
      detected_mode <= '0;
      cur_mode      <= '0;
      first_done    <= 1'b0;
      confirm       <= 1'b0;
      restart       <= 1'b0;
      sync_syms     <= '0;
    end else begin
      first_done <= 1'b0;
      confirm    <= 1'b0;
      restart    <= 1'b0;
      if (start) begin
        state     <= SPS_FIRST;
        cur_stage <= SPS_IDLE;
        sync_syms <= '0;
      end else begin
        if (sym_start) cur_stage <= state;
        if (sym_end) begin
          if (cur_stage == SPS_FIRST || cur_stage == SPS_SECOND)
            sync_syms <= sync_syms + 8'd1;
          unique case (cur_stage)
            SPS_FIRST: begin
              first_mode <= best;
              pred_mode  <= best + 2'd1;
              first_done <= 1'b1;
              state      <= SPS_SECOND;
            end
            SPS_SECOND: begin
              detected_mode <= best;
              if (best == pred_mode) begin
                confirm  <= 1'b1;
                cur_mode <= best + 2'd1;
                state    <= SPS_LOCKED;
              end else begin
                restart <= 1'b1;
                state   <= SPS_FIRST;
              end
            end
            SPS_LOCKED: cur_mode <= cur_mode + 2'd1;
            default: ;
          endcase
        end
      end
    end
  end

endmodule
