// decision_maker: turns the four SDO spike flags of a module into the four
// ISMS trigger signals and the blanking controls.
//
// Four counter & delay units (one per recording channel) produce PASS1..4 and
// ADB1..4. The channel combiner forms CCO1..4 from the PASS signals and the
// four 16-bit combination codes (individual mode). The pattern generator,
// started by CCO4, forms the sequential or paired-sequential triggers PGO1..4.
// An 8:4 multiplexer, switched by PG_Enable, hands either CCO1..4 or PGO1..4
// out as Trigger1..4. The blanking control unit derives SDB1..4 and SEQ_BLK
// from the codes, the StimX signals of the stimulator controller and SEQ_TRIG.
// This partitioning and its signal names are the document's.
// tick / bin_tick come from the DSP control unit (28 us / 56 us).
module decision_maker
  import bsi_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tick,
  input  logic           bin_tick,
  input  logic [NCH-1:0] sdo,
  input  logic [NCH-1:0] stim,
  input  logic [NCH-1:0][$bits(cd_params_t)-1:0] cd_p,
  input  dm_params_t     p,
  output logic [NCH-1:0] trigger,
  output logic [NCH-1:0] pass,
  output logic [NCH-1:0] adb,
  output logic [NCH-1:0] sdb,
  output logic           seq_blk,
  output logic           seq_trig,
  output logic [NCH-1:0][NCH-1:0] blank  // BlankXY of the lookup table
);

  logic [NCH-1:0] adb_cd, cco, pgo;

  for (genvar c = 0; c < NCH; c++) begin : g_cd
    counter_delay u_cd (
      .clk, .rst_n, .tick, .bin_tick,
      .sdo  (sdo[c]),
      .p    (cd_params_t'(cd_p[c])),
      .pass (pass[c]),
      .adb  (adb_cd[c])
    );
  end

  channel_combiner u_cc (.pass, .code(p.comb_code), .cco);

  pattern_generator u_pg (
    .clk, .rst_n,
    .enable  (p.pg_enable),
    .paired  (p.paired),
    .tick56  (bin_tick),
    .cco4    (cco[NCH-1]),
    .t_dstim (p.t_dstim),
    .pgo,
    .seq_trig
  );

  // 8:4 trigger multiplexer
  assign trigger = p.pg_enable ? pgo : cco;

  blanking_control_unit u_bcu (
    .code      (p.comb_code),
    .stim,
    .pg_enable (p.pg_enable),
    .seq_trig,
    .adb_in    (adb_cd),
    .adb,
    .sdb,
    .seq_blk,
    .blank
  );

endmodule
