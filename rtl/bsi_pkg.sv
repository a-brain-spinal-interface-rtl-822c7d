// bsi_pkg: constants and programming-word layouts shared by the brain-spinal
// interface (BSI) DSP blocks.
//
// The chip runs every digital block from one system clock (nominal 1 MHz).
// An ADC conversion cycle is 28 system clocks (28 us, 35.7 kSa/s per channel),
// indexed by a 5-bit ADC timer 0..27 that the recording front-end supplies.
// All time parameters below are counted in ADC frames (28 us) or in pairs of
// frames (56 us), as the document states for each of them.
//
// Field widths that the document prints (10b samples, 8b T1..T4, 10b T5..T7,
// 10b T_D, 16b combination codes, 5b pulse count, 6b DAC code, 4b current
// adjust, 2b discharge-resistor control, 5b clock trim) are taken as printed.
// Widths it does not print (T_Bin, T_D_Stim, PASS duration, phase durations,
// mode bits) are this design's choices, sized to reach the ranges the
// document quotes (T_Bin ~0.5 s, T_D_Stim ~1 s in 56 us steps).
package bsi_pkg;

  localparam int NCH      = 4;   // recording / stimulating channels per module
  localparam int NMOD     = 2;   // identical modules on the chip
  localparam int DW       = 10;  // ADC sample width
  localparam int ATW      = 5;   // ADC timer width
  localparam int FRAME    = 28;  // system clocks per ADC conversion cycle
  localparam int MIDSCALE = 512; // mid-scale code of the 10b data path

  // Spike discriminator settings, one set per module (shared by its 4 channels).
  // L0/L1: positive / negative threshold; L2..L3: window 1; L4..L5: window 2.
  typedef struct packed {
    logic [DW-1:0] l0, l1, l2, l3, l4, l5;
    logic [7:0]    t1, t2, t3, t4;
    logic [9:0]    t5, t6, t7;
  } sd_params_t;

  // Counter & delay settings, one set per recording channel.
  typedef struct packed {
    logic [3:0]  n;       // spikes needed (1..15; 0 disables the channel)
    logic [12:0] t_bin;   // bin duration, 56 us steps
    logic [9:0]  t_d;     // spike-to-PASS delay, 28 us steps
    logic [9:0]  t_pass;  // PASS duration, 28 us steps
  } cd_params_t;

  // Decision maker settings.
  typedef struct packed {
    logic                  pg_enable;  // 1: pattern generator (sequential modes)
    logic                  paired;     // 1: paired sequential (1,2 then 3,4)
    logic [13:0]           t_dstim;    // inter-channel stimulus delay, 56 us steps
    logic [NCH-1:0][15:0]  comb_code;  // [x] = combination code of stim channel x+1
  } dm_params_t;

  // Stimulator controller settings (pulse timing, shared by the 4 channels).
  typedef struct packed {
    logic        biphasic;     // 1: anodic + cathodic, 0: monophasic + passive discharge
    logic [4:0]  n_pulses;     // pulses per train, 1..31 (0: no train)
    logic [9:0]  t_anodic;     // system clocks
    logic [9:0]  t_cathodic;   // system clocks
    logic [9:0]  t_discharge;  // system clocks
  } stim_params_t;

  // Static settings of the analog stimulating back-end, passed straight out.
  typedef struct packed {
    logic [5:0] dac_code;
    logic [3:0] current_adjust;
    logic [1:0] discharge_res;
    logic       power_en;
  } stim_analog_t;

  typedef struct packed {
    logic                  hpf_k16;  // 1: K = 1/16 (366 Hz), 0: K = 1/8 (756 Hz)
    sd_params_t            sd;
    logic [NCH-1:0][$bits(cd_params_t)-1:0] cd;  // [c] = channel c+1
    dm_params_t            dm;
    stim_params_t          stim;
    stim_analog_t          stim_an;
  } dsp_params_t;

  typedef enum logic [1:0] {
    TX_DATA = 2'd0,  // one channel's 10b data with its SDO, 3b preamble
    TX_SDO  = 2'd1,  // SDO1..8 with a 6b preamble
    TX_TRIG = 2'd2,  // Trigger1..8 with a 6b preamble
    TX_OFF  = 2'd3
  } tx_mode_e;

  typedef struct packed {
    logic [4:0]       clk_trim;     // clock generator frequency code
    tx_mode_e         tx_mode;
    logic [2:0]       tx_ch;        // channel 1..8 sent in TX_DATA mode (0 = ch 1)
    logic             tx_filtered;  // 1: highpass-filtered data, 0: raw ADC data
    dsp_params_t [NMOD-1:0] mod;    // [m] = module m+1
  } sys_params_t;

  // Size of the on-chip parameter register.
  localparam int PREG_BITS = 874;
  // Bits of it not mapped to a DSP field: handed to the recording front-ends.
  localparam int FE_BITS   = PREG_BITS - $bits(sys_params_t);

endpackage
