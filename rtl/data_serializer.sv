// data_serializer: builds the 500 kb/s bit stream sent to the FSK transmitter
// and the output pads.
//
// The serial clock is the 1 MHz system clock divided by two, aligned to the
// ADC timer, so one 28-cycle ADC frame carries 14 bits; bit k occupies ADC
// timer values 2k and 2k+1 (ser_clk low, then high). The frame sent in ADC
// frame n is assembled at timer 27 of frame n-1. Three frame formats, bits in
// time order as the document's timing chart prints them:
//   TX_DATA: D8 D7 D2 D6 D5 D3 D4 PA2 PA1 PA0 D0 SDO D9 D1
//            (one channel's 10-bit sample, its SDO flag and a 3-bit preamble
//             scrambled into the word)
//   TX_SDO:  SDO7 SDO6 SDO5 SDO4 SDO3 SDO2 SDO1 PA5..PA0 SDO8
//   TX_TRIG: Trig7 .. Trig1 PA5..PA0 Trig8
// In TX_SDO / TX_TRIG mode the flags of both modules (1..4: module 1,
// 5..8: module 2) are sent; a flag is sent as 1 if it was high at any cycle of
// the frame, so short pulses are not lost. TX_OFF sends zeros.
// The preamble values are not given in the document and are parameters here.
module data_serializer
  import bsi_pkg::*;
#(
  parameter logic [2:0] PA3 = 3'b101,     // 3-bit preamble (data mode)
  parameter logic [5:0] PA6 = 6'b110100   // 6-bit preamble (SDO / trigger modes)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [ATW-1:0] adc_timer,
  input  tx_mode_e       mode,
  input  logic [DW-1:0]  data,      // sample of the selected channel
  input  logic           data_sdo,  // SDO of the selected channel
  input  logic [7:0]     sdo,       // SDO1..8
  input  logic [7:0]     trig,      // Trigger1..8
  output logic           ser_clk,
  output logic           ser_data
);

  logic [13:0] frame, next_frame;  // frame[k] = bit sent in slot k
  logic [7:0]  sdo_acc, trig_acc;
  logic        dsdo_acc;
  logic        last;
  logic [5:0]  pa6_rev;  // PA0..PA5 from MSB down: PA5 goes out first

  always_comb for (int i = 0; i < 6; i++) pa6_rev[i] = PA6[5-i];

  assign last = (int'(adc_timer) == FRAME - 1);

  always_comb begin
    logic [7:0] s, t;
    s = sdo_acc | sdo;
    t = trig_acc | trig;
    unique case (mode)
      TX_DATA: next_frame = {data[1], data[9], dsdo_acc | data_sdo, data[0],
                             PA3[0], PA3[1], PA3[2],
                             data[4], data[3], data[5], data[6], data[2], data[7], data[8]};
      TX_SDO:  next_frame = {s[7], pa6_rev, s[0], s[1], s[2], s[3], s[4], s[5], s[6]};
      TX_TRIG: next_frame = {t[7], pa6_rev, t[0], t[1], t[2], t[3], t[4], t[5], t[6]};
      default: next_frame = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame    <= '0;
      sdo_acc  <= '0;
      trig_acc <= '0;
      dsdo_acc <= 1'b0;
    end else if (last) begin
      frame    <= next_frame;
      sdo_acc  <= '0;
      trig_acc <= '0;
      dsdo_acc <= 1'b0;
    end else begin
      sdo_acc  <= sdo_acc | sdo;
      trig_acc <= trig_acc | trig;
      dsdo_acc <= dsdo_acc | data_sdo;
    end
  end

  assign ser_clk  = adc_timer[0];
  assign ser_data = frame[adc_timer[4:1]];

endmodule
