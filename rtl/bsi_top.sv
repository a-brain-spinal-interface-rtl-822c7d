// bsi_top: digital core of the brain-spinal interface SoC.
//
// The chip records intracortical spikes on 2 x 4 channels, discriminates them
// in real time and turns chosen spike patterns into intraspinal stimulation
// triggers. Two identical modules (dsp_unit) each serve four recording and
// four stimulating channels; a parameter register, the clock and the data
// serializer that feeds the FSK transmitter are shared.
//
// Not in this RTL (analog or RF circuits), brought out as ports instead:
//   - recording front-ends (amplifier, filters, SAR ADCs): adc_data holds each
//     channel's latest 10-bit code, adc_timer each module's 5-bit conversion
//     timer (0..27, one count per system clock);
//   - stimulating back-ends (DAC, electrode drivers, level shifter): they take
//     the anodic / cathodic / discharge phase signals and the static stim_an
//     settings;
//   - clock generator: clk is its 1 MHz output, clk_trim its 5-bit setting;
//   - FSK transmitter: takes ser_data / ser_clk.
//
// Programming: the 874-bit parameter register is shifted in MSB first
// (prog_shift, prog_din) and applied with prog_load. Its low 811 bits are the
// sys_params_t word of bsi_pkg; the upper FE_BITS go out unchanged on fe_ctrl
// for the recording front-ends, whose control fields are not broken down here.
// Channel numbering: index m*4+c is channel c+1 of module m+1 (1..8).
// Each dsp_unit's seq_trig and internal-clock outputs are left unconnected
// here: they only matter inside the module and are kept on dsp_unit for
// observation and its own testbench.
module bsi_top
  import bsi_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              prog_shift,
  input  logic                              prog_din,
  input  logic                              prog_load,
  output logic                              prog_dout,
  input  logic [NMOD-1:0][ATW-1:0]          adc_timer,
  input  logic [NMOD-1:0][NCH-1:0][DW-1:0]  adc_data,
  output logic [NMOD*NCH-1:0]               sdo,
  output logic [NMOD*NCH-1:0]               pass,
  output logic [NMOD*NCH-1:0]               trigger,
  output logic [NMOD*NCH-1:0]               stim,
  output logic [NMOD*NCH-1:0]               anodic,
  output logic [NMOD*NCH-1:0]               cathodic,
  output logic [NMOD*NCH-1:0]               discharge,
  output logic [NMOD*NCH-1:0]               adb,
  output logic [NMOD*NCH-1:0]               sdb,
  output logic [NMOD-1:0]                   seq_blk,
  output stim_analog_t [NMOD-1:0]           stim_an,
  output logic [4:0]                        clk_trim,
  output logic [FE_BITS-1:0]                fe_ctrl,
  output logic                              ser_clk,
  output logic                              ser_data
);

  logic [PREG_BITS-1:0] preg;
  sys_params_t          sp;

  parameter_register #(.WIDTH(PREG_BITS)) u_preg (
    .clk, .rst_n, .shift_en(prog_shift), .din(prog_din), .load(prog_load),
    .dout(prog_dout), .q(preg)
  );

  assign sp       = sys_params_t'(preg[$bits(sys_params_t)-1:0]);
  assign fe_ctrl  = preg[PREG_BITS-1 -: FE_BITS];
  assign clk_trim = sp.clk_trim;

  logic [NMOD-1:0][DW-1:0] tx_raw, tx_filt;
  logic [NMOD-1:0]         tx_sdo, seq_trig;
  logic [NMOD-1:0][NCH-1:0] int_clk;

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    dsp_unit u_dsp (
      .clk, .rst_n,
      .adc_timer (adc_timer[m]),
      .adc_data  (adc_data[m]),
      .p         (sp.mod[m]),
      .tx_ch     (sp.tx_ch[1:0]),
      .sdo       (sdo[m*NCH +: NCH]),
      .pass      (pass[m*NCH +: NCH]),
      .trigger   (trigger[m*NCH +: NCH]),
      .adb       (adb[m*NCH +: NCH]),
      .sdb       (sdb[m*NCH +: NCH]),
      .seq_blk   (seq_blk[m]),
      .seq_trig  (seq_trig[m]),
      .int_clk   (int_clk[m]),
      .anodic    (anodic[m*NCH +: NCH]),
      .cathodic  (cathodic[m*NCH +: NCH]),
      .discharge (discharge[m*NCH +: NCH]),
      .stim      (stim[m*NCH +: NCH]),
      .tx_raw    (tx_raw[m]),
      .tx_filt   (tx_filt[m]),
      .tx_sdo    (tx_sdo[m])
    );
    assign stim_an[m] = sp.mod[m].stim_an;
  end

  logic          tx_m;
  logic [DW-1:0] tx_data;

  assign tx_m    = sp.tx_ch[2];
  assign tx_data = sp.tx_filtered ? tx_filt[tx_m] : tx_raw[tx_m];

  // The serializer is aligned to module 1's conversion timer.
  data_serializer u_ser (
    .clk, .rst_n,
    .adc_timer (adc_timer[0]),
    .mode      (sp.tx_mode),
    .data      (tx_data),
    .data_sdo  (tx_sdo[tx_m]),
    .sdo, .trig(trigger),
    .ser_clk, .ser_data
  );

endmodule
