// sp_prefill: channel-estimation pilot storage with scattered pilot
// pre-filling.
//
// Channel estimation interpolates over the scattered pilots of several
// symbols, so normally it can only start collecting pilots once the SP mode
// is known. Pre-filling starts earlier: while the 1st SPS examines a symbol,
// the carriers of all four candidate pilot groups (3g + 12p, g = 0..3) of
// that symbol are written into banks 0..3; while the 2nd SPS examines the
// next symbol, the carriers of the group predicted by the 1st SPS are
// written into the bank after the one of the detected group (bank m1+1,
// as in the document's illustration: detected group 3 -> bank 4, detected
// group 0 -> bank 1, overwriting a candidate that is no longer needed).
// If the 2nd SPS confirms the prediction, banks m1 and m1+1 are kept, so
// pilots of two symbols are already stored when synchronization
// completes, one symbol earlier than without pre-filling. The other
// candidate banks are released. If the 2nd SPS disagrees, everything
// written is discarded and the process restarts. After lock, each symbol's
// pilots go to a free bank, or to the bank with the oldest symbol.
// NBANK = 6 banks as in the document's illustration; the bank depth covers
// one pilot group of an 8K symbol (569 carriers).
//
// Interface: per symbol sym_start, carriers k = 0..K-1 in order
// (sc_valid/sc_data), sym_end. The stage of the symbol (sps_state from
// sp_sync, sampled at sym_start), pred_mode (2nd SPS) and cur_mode (locked)
// select what is written. confirm (with first_mode) and restart come from
// sp_sync after the 2nd SPS symbol. Each bank reports valid, the group it
// holds and the number of the symbol (sym_no, counted at sym_start) it came
// from. Read port: rd_bank/rd_addr, rd_data one cycle later.
module sp_prefill
  import dvbt_pkg::*;
#(
  parameter int NBANK = 6,
  parameter int DEPTH = 569     // pilots of one group in an 8K symbol
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sym_start,
  input  logic                     sc_valid,
  input  cplx_t                    sc_data,
  input  logic                     sym_end,
  input  sps_state_e               sps_state,
  input  logic [1:0]               pred_mode,
  input  logic [1:0]               cur_mode,
  input  logic                     confirm,
  input  logic [1:0]               first_mode,
  input  logic                     restart,
  output logic [NBANK-1:0]         bank_valid,
  output logic [1:0]               bank_group [NBANK],
  output logic [7:0]               bank_sym   [NBANK],
  output logic [7:0]               sym_no,
  input  logic [$clog2(NBANK)-1:0] rd_bank,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output cplx_t                    rd_data
);
  localparam int BW = $clog2(NBANK);
  localparam int DW = $clog2(DEPTH);
  // bank used by the 2nd SPS symbol: the one after the detected group's
  logic [BW-1:0] pre_bank;
  assign pre_bank = BW'(first_mode) + BW'(1);

  cplx_t mem [NBANK][DEPTH];

  sps_state_e           stage;          // role of the symbol being received
  logic [1:0]           tgt_group;
  logic [BW-1:0]        tgt_bank;
  logic [NBANK-1:0]     filling;        // banks written by this symbol
  logic [3:0]           c12;
  logic [DW-1:0]        p;              // k / 12

  // victim for a locked symbol: first free bank, else the oldest symbol
  logic [BW-1:0] victim;
  always_comb begin
    logic found;
    logic [7:0] oldest_age;
    found = 1'b0;
    victim = '0;
    oldest_age = '0;
    for (int b = 0; b < NBANK; b++) begin
      if (!found && !bank_valid[b]) begin
        victim = BW'(b);
        found  = 1'b1;
      end
    end
    if (!found) begin
      for (int b = 0; b < NBANK; b++) begin
        if (sym_no - bank_sym[b] > oldest_age) begin
          oldest_age = sym_no - bank_sym[b];
          victim     = BW'(b);
        end
      end
    end
  end

  // write decision for the current carrier
  logic       is_sp_pos;
  logic [1:0] grp;
  logic       wr_en;
  logic [BW-1:0] wr_bank;
  always_comb begin
    is_sp_pos = (c12 == 4'd0) || (c12 == 4'd3) || (c12 == 4'd6) || (c12 == 4'd9);
    unique case (c12)
      4'd3:    grp = 2'd1;
      4'd6:    grp = 2'd2;
      4'd9:    grp = 2'd3;
      default: grp = 2'd0;
    endcase
    wr_en   = 1'b0;
    wr_bank = tgt_bank;
    if (sc_valid && is_sp_pos) begin
      unique case (stage)
        SPS_FIRST: begin wr_en = 1'b1; wr_bank = BW'(grp); end
        SPS_SECOND, SPS_LOCKED: wr_en = (grp == tgt_group);
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][p] <= sc_data;
    rd_data <= mem[rd_bank][rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage      <= SPS_IDLE;
      tgt_group  <= '0;
      tgt_bank   <= '0;
      filling    <= '0;
      c12        <= '0;
      p          <= '0;
      sym_no     <= '0;
      bank_valid <= '0;
      for (int b = 0; b < NBANK; b++) begin
        bank_group[b] <= '0;
        bank_sym[b]   <= '0;
      end
    end else begin
      if (sym_start) begin
        c12     <= '0;
        p       <= '0;
        sym_no  <= sym_no + 8'd1;
        stage   <= sps_state;
        filling <= '0;
        unique case (sps_state)
          SPS_FIRST: begin
            bank_valid <= '0;              // a new pre-fill
            for (int b = 0; b < 4; b++) begin
              filling[b]    <= 1'b1;
              bank_group[b] <= 2'(b);
              bank_sym[b]   <= sym_no + 8'd1;
            end
          end
          SPS_SECOND: begin
            tgt_group               <= pred_mode;
            tgt_bank                <= pre_bank;
            filling[pre_bank]       <= 1'b1;
            bank_valid[pre_bank]    <= 1'b0;
            bank_group[pre_bank]    <= pred_mode;
            bank_sym[pre_bank]      <= sym_no + 8'd1;
          end
          SPS_LOCKED: begin
            tgt_group          <= cur_mode;
            tgt_bank           <= victim;
            filling[victim]    <= 1'b1;
            bank_valid[victim] <= 1'b0;
            bank_group[victim] <= cur_mode;
            bank_sym[victim]   <= sym_no + 8'd1;
          end
          default: ;
        endcase
      end else if (sc_valid) begin
        c12 <= (c12 == 4'd11) ? 4'd0 : c12 + 4'd1;
        if (c12 == 4'd11) p <= p + 1'b1;
      end
      if (sym_end) begin
        bank_valid <= bank_valid | filling;
        filling    <= '0;
      end
      // outcome of the 2nd SPS, one cycle after its sym_end
      if (confirm) begin
        for (int b = 0; b < 4; b++)
          if (b != int'(first_mode) && b != int'(pre_bank)) bank_valid[b] <= 1'b0;
      end else if (restart) begin
        bank_valid <= '0;
      end
    end
  end

endmodule
