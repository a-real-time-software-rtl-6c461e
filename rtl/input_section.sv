// Input section: reset synchronizer, control-flag registers and the
// programming decoder.
//
// nr (asserted high) is synchronized by a 4-flip-flop chain into bnr
// (asserted low), the reset of the whole chip. valid, en_timer and chip_mode are captured in
// flip-flops at the same clock edge as the address enters the recognizers'
// input registers, so all of them travel together down the pipeline (the
// chip delays the flags with delay cells before the flip-flops to match the
// address path; a common clock edge does the same here). d[3:0] is decoded
// by a two-level tree of 2-to-4 decoders, enabled by prg_chip, into prg_lat,
// the one-hot "this recognizer is being programmed" select. The flag
// registers are cleared by reset, which is this design's choice.
module input_section
  import rtspa_pkg::*;
(
  input  logic          clk,
  input  logic          nr,
  input  logic          valid,
  input  logic          en_timer,
  input  chip_mode_e    chip_mode,
  input  logic          prg_chip,
  input  logic [3:0]    d,
  output logic          bnr,
  output logic          valid_q,
  output logic          en_timer_q,
  output chip_mode_e    chip_mode_q,
  output logic [15:0]   prg_lat
);
  reset_sync #(.STAGES(4)) u_rst (.clk, .nr, .bnr);

  always_ff @(posedge clk or negedge bnr) begin
    if (!bnr) begin
      valid_q     <= 1'b0;
      en_timer_q  <= 1'b0;
      chip_mode_q <= COUNT_ADDR;
    end else begin
      valid_q     <= valid;
      en_timer_q  <= en_timer;
      chip_mode_q <= chip_mode;
    end
  end

  decoder_tree u_dec (.en(prg_chip), .sel(d), .onehot(prg_lat));
endmodule
