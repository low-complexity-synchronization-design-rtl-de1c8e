// phase_acc: phase accumulator of the carrier NCO with GI phase prediction.
//
// The accumulator adds the frequency word once per useful sample (en) and
// its upper PW bits are the phase handed to the CORDIC derotator. Guard
// interval samples are dropped after symbol timing is found, so during the
// GI the accumulator is not clocked (en low) and keeps its value. Because
// the frequency estimate is constant within an OFDM symbol, the phase
// that would have accumulated over the GI is freq * N_GI, and since N_GI
// is a power of two this is freq shifted left by log2(N_GI). A predict
// pulse at the first useful sample of the next symbol adds that amount in
// one operation; the phase presented with that pulse already includes it,
// and the normal increment of the sample is added in the same cycle.
// This is the document's phase prediction scheme; word widths are this
// design's choice.
//
// Phase unit: the AW-bit accumulator spans one turn (2^AW = 2*pi); the
// output phase is the rounded-down top PW bits. freq is signed, in the
// same unit. Interface: en, predict, gi_log2, freq in; phase out, valid in
// the cycle the sample it belongs to is presented (combinational from the
// register and the predict input). load forces the accumulator to load_val (used at acquisition).
module phase_acc #(
  parameter int AW = 24,  // accumulator width, 2^AW = one turn
  parameter int PW = 16   // output phase width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [AW-1:0]        load_val,
  input  logic                 en,
  input  logic                 predict,
  input  logic [3:0]           gi_log2,
  input  logic signed [AW-1:0] freq,
  output logic [PW-1:0]        phase,
  output logic [31:0]          op_count   // accumulator updates performed
);
  logic [AW-1:0] acc;
  logic [AW-1:0] gi_phase, acc_now;

  // freq * N_GI: a shift, wrapping modulo one turn like the accumulator
  assign gi_phase = AW'(freq) << gi_log2;
  // the predicted GI phase already applies to the sample presented with
  // the predict pulse
  assign acc_now  = predict ? acc + gi_phase : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      op_count <= '0;
    end else if (load) begin
      acc <= load_val;
    end else begin
      if (predict | en) acc <= acc_now + (en ? AW'(freq) : '0);
      if (predict | en) op_count <= op_count + 1;
    end
  end

  assign phase = acc_now[AW-1 -: PW];

endmodule
