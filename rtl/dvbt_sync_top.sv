// dvbt_sync_top: synchronization part of a DVB-T/H OFDM receiver.
//
// What it does: takes complex baseband samples (one per 4 clocks, marked
// by rx_valid), finds the OFDM symbol timing and the fractional carrier
// frequency offset (FCFO) from the guard-interval (GI) correlation, then
// the integer carrier frequency offset (ICFO) from the continual pilots,
// and tracks the residual CFO (RCFO) and the sampling clock offset (SCO)
// from the continual pilots of consecutive symbols. Scattered-pilot
// synchronization (SPS) finds the scattered pilot pattern with the
// two-stage scheme and fills the channel estimation buffers early. The
// FFT output is available to the following channel estimator; a hard
// demapper is attached to the equalized-carrier input.
//
// How it works (signal flow as in the document's block diagram):
//   rx -> cubic Lagrange interpolator (SCO correction, skip/double,
//   GI phase prediction in interp_ctrl) -> CORDIC derotator driven by a
//   phase accumulator (NCO with GI phase prediction) -> elastic buffer ->
//   multimode FFT -> { ICFO estimation, continual-pilot extraction ->
//   RCFO/SCO estimation (CORDIC tan^-1) -> two PI loop filters,
//   scattered pilot sync, pre-filling of the CE buffers }.
//   Feedback: NCO frequency = FCFO + ICFO + RCFO loop output;
//   interpolator step = SCO loop output.
// A sequencer runs: GI correlation (symbol timing + FCFO) -> framing
// starts at the next symbol start -> first ICFO estimate is applied ->
// SETTLE symbols later tracking (RCFO/SCO loops, SPS) starts.
//
// Interface: one clock (the 4x clock); rx_valid is the 1x sample strobe.
// mode/gi are the transmission parameters (static while running); qam
// selects the demapper constellation. Status and event outputs (skip,
// double, prediction, SPS events, lock, overflow) are exported so the
// behaviour can be observed. pf_rd_* read the CE pre-fill banks.
//
// Timing: the GI correlation needs about two symbols; an FFT symbol leaves
// the FFT one symbol after it entered; ICFO takes one further symbol; the
// loops update once per symbol.
//
// Document versus own choices: the block set, the signal flow, the 4x
// clock with 1x samples, skip/double with two-bit range check, the phase
// prediction over the GI, the joint RCFO/SCO estimate from lower/upper
// pilot halves, the loop filters with power-of-two coefficients, the
// two-stage SPS and the pre-filling follow the document. The sequencer,
// the scaling of every error into NCO/interpolator units, the settle
// count, the taps of the GI correlator (taken from the receiver input, not
// the buffer output) and all widths are this design's choices. Mode and
// GI are inputs; their blind detection is not part of this design.
module dvbt_sync_top
  import dvbt_pkg::*;
#(
  parameter int AW     = 24,  // NCO / interpolator accumulator width
  parameter int SETTLE = 3,   // symbols between ICFO correction and tracking
  parameter int EBUF   = 16   // elastic buffer depth
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fft_mode_e     mode,
  input  gi_e           gi,
  input  logic [1:0]    qam,
  // received samples (1x strobe)
  input  logic          rx_valid,
  input  cplx_t         rx_data,
  // FFT output towards the channel estimator; ce_ready low holds the
  // FFT input (the elastic buffer then fills and may overflow)
  input  logic          ce_ready,
  output logic          fft_valid,
  output cplx_t         fft_data,
  output logic [12:0]   fft_bin,
  output logic          fft_sof,
  // equalized carriers from the channel estimator -> hard demapper
  input  logic          eq_valid,
  input  cplx_t         eq_data,
  output logic          dm_valid,
  output logic [5:0]    dm_bits,
  output logic [2:0]    dm_nbits,
  // CE pre-fill buffer read port
  input  logic [2:0]    pf_rd_bank,
  input  logic [9:0]    pf_rd_addr,
  output cplx_t         pf_rd_data,
  output logic [5:0]    pf_bank_valid,
  // status and events
  output logic          sym_found,       // GI correlation peak found
  output logic          tracking,        // RCFO/SCO loops running
  output logic          icfo_valid,      // pulse: ICFO estimate
  output logic signed [7:0] icfo,
  output logic          est_valid,       // pulse: RCFO/SCO estimate
  output logic signed [16:0] rcfo_err,
  output logic signed [16:0] sco_err,
  output logic signed [AW-1:0] nco_freq,
  output logic signed [AW-1:0] sco_delta,
  output logic          predict_ev,      // pulse: GI phase prediction
  output logic [15:0]   skip_cnt,
  output logic [15:0]   double_cnt,
  output sps_state_e    sps_state,
  output logic [1:0]    sps_mode,        // detected scattered pilot phase
  output logic          sps_first,
  output logic          sps_confirm,
  output logic          sps_restart,
  output logic          sps_lock,
  output logic          ebuf_overflow
);
  localparam int MUW = 12;
  localparam int S   = 8;    // ICFO search range

  logic [3:0]  lg, glg;
  logic [13:0] n_len, g_len, l_len;
  logic [12:0] k_num;
  assign lg    = fft_log2(mode);
  assign glg   = gi_log2(mode, gi);
  assign n_len = 14'(1) << lg;
  assign g_len = 14'(1) << glg;
  assign l_len = n_len + g_len;
  assign k_num = num_carriers(mode);

  // ------------------------------------------------------------------
  // Sequencer
  logic fft_eof;
  logic signed [7:0] icfo_raw;
  typedef enum logic [2:0] {Q_SYNC, Q_FRAME, Q_ICFO, Q_SETTLE, Q_TRACK} seq_e;
  seq_e        seq;
  logic        ss_start, ss_found, ss_fcfo_valid;
  logic [14:0] ss_phase;   // unused MSB guard below
  logic [13:0] ph;         // GI-relative phase of the next rx sample
  logic        ph_ok, fcfo_ok;
  logic signed [15:0] ss_fcfo;
  logic signed [AW-1:0] f_fcfo, f_icfo, f_rcfo;
  logic [3:0]  settle_cnt;
  logic        track_start;
  logic [39:0] ss_peak;
  logic [CIW:0] ss_sym_phase;

  // framing
  typedef enum logic [1:0] {F_IDLE, F_GI, F_USE} frm_e;
  frm_e        frm;
  logic [13:0] gcnt, ucnt;
  logic        first_out, any_sym;
  logic        frame_go;
  logic        win_gi, win_pred, win_valid;

  assign frame_go = (seq == Q_FRAME) && rx_valid && ph_ok && fcfo_ok && (ph == '0);
  assign ss_phase = 15'(ss_sym_phase);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq         <= Q_SYNC;
      ss_start    <= 1'b1;
      ph          <= '0;
      ph_ok       <= 1'b0;
      fcfo_ok     <= 1'b0;
      f_fcfo      <= '0;
      f_icfo      <= '0;
      icfo        <= '0;
      settle_cnt  <= '0;
      track_start <= 1'b0;
    end else begin
      ss_start    <= 1'b0;
      track_start <= 1'b0;
      // GI-relative phase counter
      if (ss_found) begin
        ph    <= (ss_phase[13:0] + 14'd1 == l_len) ? '0 : ss_phase[13:0] + 14'd1;
        ph_ok <= 1'b1;
      end else if (rx_valid) begin
        ph <= (ph + 14'd1 == l_len) ? '0 : ph + 14'd1;
      end
      if (ss_fcfo_valid && !fcfo_ok) begin
        fcfo_ok <= 1'b1;
        // correlation angle over N samples -> turns per sample
        f_fcfo  <= (AW'(ss_fcfo) <<< (AW - 16)) >>> lg;
      end
      case (seq)
        Q_SYNC:   if (ph_ok) seq <= Q_FRAME;
        Q_FRAME:  if (frame_go) seq <= Q_ICFO;
        Q_ICFO:   if (icfo_valid) begin
                    icfo   <= icfo_raw;
                    f_icfo <= AW'(icfo_raw) <<< (AW - int'(lg));
                    seq    <= Q_SETTLE;
                  end
        Q_SETTLE: if (fft_valid && fft_eof) begin
                    if (int'(settle_cnt) == SETTLE - 1) begin
                      seq         <= Q_TRACK;
                      track_start <= 1'b1;
                    end
                    settle_cnt <= settle_cnt + 1'b1;
                  end
        default: ;
      endcase
    end
  end
  assign sym_found = ph_ok;
  assign tracking  = (seq == Q_TRACK);

  symbol_sync u_symsync (
    .clk, .rst_n, .start(ss_start), .mode, .gi,
    .in_valid(rx_valid), .in_data(rx_data),
    .found(ss_found), .sym_phase(ss_sym_phase), .peak_mag(ss_peak),
    .fcfo_valid(ss_fcfo_valid), .fcfo(ss_fcfo));

  // ------------------------------------------------------------------
  // Framing: G input windows of GI (prediction on the last), then N
  // interpolated output samples
  logic  ip_valid;
  cplx_t ip_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frm       <= F_IDLE;
      gcnt      <= '0;
      ucnt      <= '0;
      first_out <= 1'b0;
      any_sym   <= 1'b0;
    end else begin
      case (frm)
        F_IDLE: if (frame_go) begin
                  frm  <= (g_len == 14'd1) ? F_USE : F_GI;
                  gcnt <= 14'd1;
                end
        F_GI:   if (rx_valid) begin
                  gcnt <= gcnt + 1'b1;
                  if (gcnt == g_len - 1) begin
                    frm       <= F_USE;
                    ucnt      <= '0;
                    first_out <= 1'b1;
                  end
                end
        default: if (ip_valid) begin
                  first_out <= 1'b0;
                  if (ucnt == n_len - 1) begin
                    frm     <= F_GI;
                    gcnt    <= '0;
                    any_sym <= 1'b1;
                  end else begin
                    ucnt <= ucnt + 1'b1;
                  end
                end
      endcase
    end
  end

  // the first GI window is the one that starts framing
  assign win_valid = rx_valid && (frm != F_IDLE || frame_go);
  assign win_gi    = (frm == F_GI) || (frm == F_IDLE);
  assign win_pred  = win_gi && ((frm == F_IDLE) ? (g_len == 14'd1) : (gcnt == g_len - 1));

  // ------------------------------------------------------------------
  // Interpolator (SCO correction)
  logic calc;
  logic signed [MUW-1:0] mu;

  interp_ctrl #(.AW(AW), .MUW(MUW)) u_ictrl (
    .clk, .rst_n, .win_valid, .gi(win_gi), .predict(win_pred),
    .gi_log2(glg), .delta(sco_delta), .calc, .mu, .skip_cnt, .double_cnt);

  lagrange_interp #(.MUW(MUW)) u_interp (
    .clk, .rst_n, .in_valid(rx_valid), .in_data(rx_data), .calc, .mu,
    .out_valid(ip_valid), .out_data(ip_data));

  // ------------------------------------------------------------------
  // Derotator with phase accumulator (NCO)
  logic [15:0] nco_phase;
  logic [31:0] nco_ops;
  logic        rot_valid;
  cplx_t       rot_data;

  assign predict_ev = ip_valid && first_out && any_sym;

  phase_acc #(.AW(AW), .PW(16)) u_nco (
    .clk, .rst_n, .load(frame_go), .load_val('0),
    .en(ip_valid), .predict(predict_ev), .gi_log2(glg), .freq(nco_freq),
    .phase(nco_phase), .op_count(nco_ops));

  cordic_rotator #(.PW(16)) u_derot (
    .clk, .rst_n, .in_valid(ip_valid), .in_data(ip_data), .in_phase(nco_phase),
    .out_valid(rot_valid), .out_data(rot_data));

  // symbol start marker at the derotator output
  logic [13:0] rcnt;
  logic        frm_on;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt   <= '0;
      frm_on <= 1'b0;
    end else begin
      if (frame_go) frm_on <= 1'b1;
      if (rot_valid && frm_on) rcnt <= (rcnt == n_len - 1) ? '0 : rcnt + 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // Elastic buffer -> FFT
  logic  eb_full, eb_empty, eb_sof;
  cplx_t eb_data;
  logic [$clog2(EBUF):0] eb_level;

  elastic_buffer #(.DEPTH(EBUF)) u_ebuf (
    .clk, .rst_n, .push(rot_valid && frm_on), .push_data(rot_data),
    .push_sof(rcnt == '0), .pop(!eb_empty && ce_ready), .pop_data(eb_data),
    .pop_sof(eb_sof), .full(eb_full), .empty(eb_empty), .level(eb_level),
    .overflow(ebuf_overflow));

  fft_multimode u_fft (
    .clk, .rst_n, .mode, .in_valid(!eb_empty && ce_ready), .in_data(eb_data),
    .in_sof(eb_sof), .out_valid(fft_valid), .out_data(fft_data),
    .out_bin(fft_bin), .out_sof(fft_sof), .out_eof(fft_eof));

  // carrier index of the FFT output: bin - N/2 + (K-1)/2
  logic signed [14:0] kc, kj;
  logic in_band, in_search;
  assign kc        = 15'($signed({2'b0, fft_bin})) - 15'($signed({1'b0, n_len >> 1}))
                     + 15'($signed({3'b0, (k_num - 13'd1) >> 1}));
  assign kj        = kc + 15'(S);
  assign in_band   = fft_valid && (kc >= 0) && (kc < 15'($signed({2'b0, k_num})));
  assign in_search = fft_valid && (kj >= 0) && (kj < 15'($signed({2'b0, k_num})) + 15'(2 * S));

  logic sym_start, sym_end;
  assign sym_start = fft_valid && fft_sof;
  assign sym_end   = fft_valid && fft_eof;

  // ------------------------------------------------------------------
  // ICFO
  icfo_est #(.S(S)) u_icfo (
    .clk, .rst_n, .mode, .sym_start, .in_valid(in_search), .in_data(fft_data),
    .sym_end, .est_valid(icfo_valid), .icfo(icfo_raw));

  // ------------------------------------------------------------------
  // Continual pilots -> RCFO/SCO
  logic          cpg_valid, cpg_last, cp_hit;
  logic [CIW-1:0] cpg_pos;
  logic [7:0]    cpg_index;
  assign cp_hit = in_band && cpg_valid && (kc == 15'($signed({2'b0, cpg_pos})));

  cp_pos_gen u_cpgen (
    .clk, .rst_n, .start(sym_start), .mode, .next(cp_hit),
    .valid(cpg_valid), .pos(cpg_pos), .index(cpg_index), .last(cpg_last));

  logic est_raw;
  rcfo_sco_est u_rse (
    .clk, .rst_n, .start(track_start), .sym_start, .cp_valid(cp_hit && tracking),
    .cp_data(fft_data), .cp_upper(kc > 15'($signed({3'b0, (k_num - 13'd1) >> 1}))),
    .sym_end, .est_valid(est_raw), .rcfo_err, .sco_err);
  assign est_valid = est_raw && tracking;

  logic                 lf_r_valid, lf_s_valid;
  logic signed [27:0]   lf_r, lf_s;
  loop_filter #(.IW(17)) u_lf_rcfo (
    .clk, .rst_n, .clr(!tracking), .in_valid(est_valid), .in_err(rcfo_err),
    .out_valid(lf_r_valid), .out_ctrl(lf_r));
  loop_filter #(.IW(17), .C1SH(1), .C2SH(3)) u_lf_sco (
    .clk, .rst_n, .clr(!tracking), .in_valid(est_valid), .in_err(sco_err),
    .out_valid(lf_s_valid), .out_ctrl(lf_s));

  // loop outputs (4 fractional bits) in accumulator units; the sum of the
  // two half-band angles is twice the per-symbol CFO phase step
  assign f_rcfo    = AW'((32'(lf_r) <<< (AW - 16 - 1 - 4)) >>> lg);
  // a positive pilot phase slope means the receiver samples too early:
  // the interpolator step must shrink
  assign sco_delta = AW'(0) - AW'((32'(lf_s) <<< (AW - 16 - 4)) >>> lg);
  assign nco_freq  = f_fcfo + f_icfo + f_rcfo;

  // ------------------------------------------------------------------
  // Scattered pilot sync and CE pre-filling
  logic [1:0] sps_first_mode, sps_pred_mode, sps_cur_mode;
  logic [7:0] sps_syms;
  logic [1:0] pf_group [6];
  logic [7:0] pf_sym [6];
  logic [7:0] pf_sym_no;

  sp_sync u_sps (
    .clk, .rst_n, .start(track_start), .sym_start, .sc_valid(in_band),
    .sc_data(fft_data), .sym_end, .state(sps_state), .first_mode(sps_first_mode),
    .pred_mode(sps_pred_mode), .detected_mode(sps_mode), .cur_mode(sps_cur_mode),
    .first_done(sps_first), .confirm(sps_confirm), .restart(sps_restart),
    .sync_syms(sps_syms));
  assign sps_lock = (sps_state == SPS_LOCKED);

  sp_prefill u_prefill (
    .clk, .rst_n, .sym_start, .sc_valid(in_band), .sc_data(fft_data), .sym_end,
    .sps_state, .pred_mode(sps_pred_mode), .cur_mode(sps_cur_mode),
    .confirm(sps_confirm), .first_mode(sps_first_mode), .restart(sps_restart),
    .bank_valid(pf_bank_valid), .bank_group(pf_group), .bank_sym(pf_sym),
    .sym_no(pf_sym_no), .rd_bank(pf_rd_bank), .rd_addr(pf_rd_addr),
    .rd_data(pf_rd_data));

  // ------------------------------------------------------------------
  // Hard demapper on the equalized carriers
  hard_demapper u_demap (
    .clk, .rst_n, .in_valid(eq_valid), .in_data(eq_data), .qam,
    .out_valid(dm_valid), .bits(dm_bits), .nbits(dm_nbits));

endmodule
