// dsp_control_unit: time-slot generator of one module's DSP unit.
//
// The recording front-end counts each 28-cycle ADC conversion with a 5-bit
// ADC timer (0..27). The DSP unit serves its four recording channels one after
// the other in that frame: each channel gets a 3-cycle slot, of which the
// first two cycles are that channel's "internal clock" and the third is a gap
// before the next channel. Channel 1 uses ADC timer values 1..3, channel 2
// 4..6, channel 3 7..9, channel 4 10..12; the rest of the frame is idle.
// (The document gives the 2-cycle internal clock, the 1-cycle gap and the
// 3-cycle slot; the slot start at timer value 1 is read off its timing chart.)
//
// The internal clocks are realised as clock enables on the single system
// clock, not as gated clocks:
//   hpf_en  - first cycle of a slot: the highpass filter takes channel ch_sel
//   sd_en   - second cycle: the spike discriminator evaluates channel ch_sel
//   int_clk - per channel, high during both cycles of its slot
// All three are forced low while seq_blk (sequential blanking) is active, as
// the document switches the internal clocks off during that blanking.
// frame_tick pulses once per frame (timer 13, after the last slot) and
// bin_tick on every second frame_tick; they pace the 28 us and 56 us counters
// of the decision maker and are not blanked.
// Outputs other than bin_tick decode the ADC timer combinationally.
module dsp_control_unit
  import bsi_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [ATW-1:0] adc_timer,
  input  logic           seq_blk,
  output logic [1:0]     ch_sel,
  output logic           hpf_en,
  output logic           sd_en,
  output logic [NCH-1:0] int_clk,
  output logic           frame_tick,
  output logic           bin_tick
);

  localparam int SLOT0    = 1;   // ADC timer value of channel 1's first cycle
  localparam int SLOT_LEN = 3;
  localparam int TICK_AT  = SLOT0 + NCH * SLOT_LEN;  // 13

  logic       in_slots;
  logic [4:0] rel;
  logic [1:0] phase;
  logic       odd_frame;

  always_comb begin
    in_slots = (int'(adc_timer) >= SLOT0) && (int'(adc_timer) < TICK_AT);
    rel      = adc_timer - 5'(SLOT0);
    ch_sel   = 2'(rel / 5'(SLOT_LEN));
    phase    = 2'(rel % 5'(SLOT_LEN));
    hpf_en   = in_slots && (phase == 2'd0) && !seq_blk;
    sd_en    = in_slots && (phase == 2'd1) && !seq_blk;
    int_clk  = '0;
    if (in_slots && phase != 2'd2 && !seq_blk) int_clk[ch_sel] = 1'b1;
    frame_tick = (int'(adc_timer) == TICK_AT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          odd_frame <= 1'b0;
    else if (frame_tick) odd_frame <= !odd_frame;
  end

  assign bin_tick = frame_tick && odd_frame;

endmodule
