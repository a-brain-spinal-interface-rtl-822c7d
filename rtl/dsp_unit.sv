// dsp_unit: digital signal processing unit of one 4-channel BSI module.
//
// Chain, per recording channel and ADC frame (28 system clocks):
//   ADC sample -> 4:1 input mux -> digital highpass filter -> spike
//   discriminator (SDO) -> decision maker (PASS, Trigger) -> stimulator
//   controller (pulse-train phases, StimX)
// and the blanking loop back: ADB/SDB from the decision maker reset the
// discriminator's channel timers, SEQ_BLK holds the discriminator input at
// mid-scale and stops the channel time slots.
// The control unit shares the datapath between the four channels: channel c
// is filtered at ADC timer 1+3c and discriminated one cycle later, so each
// channel costs three system clocks. Decision-maker and stimulator-controller
// state runs every cycle (their time bases are 28 us / 56 us ticks and the
// 1 MHz clock).
// For the serializer the unit also holds the latest raw and filtered sample of
// channel tx_ch (held registers, updated in that channel's slot).
// The block partitioning follows the document; the tx sample registers are
// this design's way of handing one channel to the shared serializer.
// The stim_an field of p is not read here (the top sends it straight to the
// analog back-end), and the discriminator timers and the BlankXY table are
// internal signals kept for observation only.
module dsp_unit
  import bsi_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ATW-1:0]          adc_timer,
  input  logic [NCH-1:0][DW-1:0]  adc_data,   // [c] = recording channel c+1
  input  dsp_params_t             p,
  input  logic [1:0]              tx_ch,
  output logic [NCH-1:0]          sdo,
  output logic [NCH-1:0]          pass,
  output logic [NCH-1:0]          trigger,
  output logic [NCH-1:0]          adb,
  output logic [NCH-1:0]          sdb,
  output logic                    seq_blk,
  output logic                    seq_trig,
  output logic [NCH-1:0]          int_clk,
  output logic [NCH-1:0]          anodic,
  output logic [NCH-1:0]          cathodic,
  output logic [NCH-1:0]          discharge,
  output logic [NCH-1:0]          stim,
  output logic [DW-1:0]           tx_raw,
  output logic [DW-1:0]           tx_filt,
  output logic                    tx_sdo
);

  logic [1:0]     ch_sel, y_ch;
  logic           hpf_en, sd_en, frame_tick, bin_tick, y_valid;
  logic [DW-1:0]  mux_out, y;
  logic [9:0]     sd_timer [NCH];
  logic [NCH-1:0][NCH-1:0] blank;

  dsp_control_unit u_ctrl (
    .clk, .rst_n, .adc_timer, .seq_blk,
    .ch_sel, .hpf_en, .sd_en, .int_clk, .frame_tick, .bin_tick
  );

  // 4:1 input multiplexer
  assign mux_out = adc_data[ch_sel];

  digital_hpf u_hpf (
    .clk, .rst_n, .en(hpf_en), .ch(ch_sel), .x(mux_out), .k16(p.hpf_k16),
    .y, .y_ch, .y_valid
  );

  spike_discriminator u_sd (
    .clk, .rst_n, .en(sd_en), .ch(ch_sel), .x(y), .seq_blk,
    .adb, .sdb, .p(p.sd), .sdo, .timer(sd_timer)
  );

  decision_maker u_dm (
    .clk, .rst_n, .tick(frame_tick), .bin_tick, .sdo, .stim,
    .cd_p(p.cd), .p(p.dm),
    .trigger, .pass, .adb, .sdb, .seq_blk, .seq_trig, .blank
  );

  stimulator_controller u_stim (
    .clk, .rst_n, .trigger, .p(p.stim),
    .anodic, .cathodic, .discharge, .stim
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_raw  <= DW'(MIDSCALE);
      tx_filt <= DW'(MIDSCALE);
    end else begin
      if (hpf_en && ch_sel == tx_ch)  tx_raw  <= mux_out;
      if (y_valid && y_ch == tx_ch)   tx_filt <= y;
    end
  end

  assign tx_sdo = sdo[tx_ch];

endmodule
