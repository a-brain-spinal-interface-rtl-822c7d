// tb_bsi_top: end-to-end test of the whole BSI digital core at its default
// size, programmed through the serial parameter register, with the real
// time constants of three in-vivo style scenarios (1 MHz clock, 28 us frames).
//
// Phase A  module 1: individual mode, recording ch 1 -> stimulating ch 4,
//                    N = 2, T_D = 25 ms (893 frames), one monophasic pulse.
//                    First two lone spikes more than T_Bin apart (bin expiry,
//                    no trigger), then a close pair (trigger).
//          module 2: sequential mode on PASS1 AND PASS4, N = 2,
//                    T_D = 10 ms (357 frames), PASS 15 ms, T_D_Stim = 220 ms
//                    (3929 steps of 56 us): Trigger1..4 220 ms apart.
//          serializer: data mode, filtered channel 1.
// Phase B  module 1: paired sequential, N = 3, T_D = 20 ms, T_D_Stim = 200 ms:
//                    Trigger1,2 then Trigger3,4 600 ms later.
//          module 2: individual, ch 2 -> stim ch 2, N = 1, biphasic train of
//                    3 pulses at 122 Hz.
//          serializer: trigger mode.
// Phase C  serializer: SDO mode, with spikes on several channels.
// Phase D  module 2: sequential with T_D_Stim = 0 on PASS2 (all four
//                    triggers in the same 56 us step), filter K = 1/8.
// Each mechanism is counted and must occur at least once: spike accepted,
// spike rejected, bin expiry, ADB, SDB, SEQ_BLK, blanked spike, individual,
// sequential, paired and simultaneous triggering, monophasic / biphasic pulses, HPF
// saturation, and the three serializer frame formats.
module tb_bsi_top;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                              rst_n, prog_shift, prog_din, prog_load, prog_dout;
  logic [NMOD-1:0][ATW-1:0]          adc_timer;
  logic [NMOD-1:0][NCH-1:0][DW-1:0]  adc_data;
  logic [NMOD*NCH-1:0]               sdo, pass, trigger, stim, anodic, cathodic, discharge, adb, sdb;
  logic [NMOD-1:0]                   seq_blk;
  stim_analog_t [NMOD-1:0]           stim_an;
  logic [4:0]                        clk_trim;
  logic [FE_BITS-1:0]                fe_ctrl;
  logic                              ser_clk, ser_data;

  frontend_model u_fe0 (.clk, .rst_n, .adc_timer(adc_timer[0]), .adc_data(adc_data[0]));
  frontend_model u_fe1 (.clk, .rst_n, .adc_timer(adc_timer[1]), .adc_data(adc_data[1]));

  bsi_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  typedef enum int {
    M_SPIKE, M_REJECT, M_BIN_EXPIRY, M_ADB, M_SDB, M_SEQ_BLK, M_BLANKED,
    M_INDIVIDUAL, M_SEQUENTIAL, M_PAIRED, M_SIMULTANEOUS, M_MONO, M_BIPHASIC, M_TRAIN,
    M_HPF_SAT, M_TX_DATA, M_TX_SDO, M_TX_TRIG, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  logic [7:0] sdo_q, trig_q, an_q, ca_q, adb_q, sdb_q;
  logic [1:0] sb_q;
  int sdo_n [8], sdo_at [8], trig_n [8], trig_at [8], an_n [8], ca_n [8];

  function automatic int fr();
    return u_fe0.frame;
  endfunction

  always @(posedge clk) begin
    for (int i = 0; i < 8; i++) begin
      if (sdo[i] && !sdo_q[i]) begin sdo_n[i]++; sdo_at[i] = fr(); seen[M_SPIKE]++; end
      if (trigger[i] && !trig_q[i]) begin trig_n[i]++; trig_at[i] = fr(); end
      if (anodic[i] && !an_q[i]) an_n[i]++;
      if (cathodic[i] && !ca_q[i]) begin ca_n[i]++; seen[M_BIPHASIC]++; end
      if (adb[i] && !adb_q[i]) seen[M_ADB]++;
      if (sdb[i] && !sdb_q[i]) seen[M_SDB]++;
    end
    for (int m = 0; m < 2; m++) if (seq_blk[m] && !sb_q[m]) seen[M_SEQ_BLK]++;
    if (dut.g_mod[0].u_dsp.u_hpf.y_valid &&
        (dut.g_mod[0].u_dsp.u_hpf.y == '1 || dut.g_mod[0].u_dsp.u_hpf.y == '0)) seen[M_HPF_SAT]++;
    sdo_q <= sdo; trig_q <= trigger; an_q <= anodic; ca_q <= cathodic;
    adb_q <= adb; sdb_q <= sdb; sb_q <= seq_blk;
  end

  task automatic clear();
    for (int i = 0; i < 8; i++) begin
      sdo_n[i] = 0; trig_n[i] = 0; an_n[i] = 0; ca_n[i] = 0; sdo_at[i] = -1; trig_at[i] = -1;
    end
  endtask

  // serial receiver: one bit per serial clock, decoded at frame end with the
  // frame formats written out here
  int data_slot [14] = '{8, 7, 2, 6, 5, 3, 4, 13, 12, 11, 0, 10, 9, 1};
  int flag_slot [14] = '{6, 5, 4, 3, 2, 1, 0, 13, 12, 11, 10, 9, 8, 7};
  logic [13:0] rx;
  logic [9:0]  exp_data, exp_data_next;
  logic [7:0]  exp_flags, exp_flags_next, acc_sdo, acc_trig;
  tx_mode_e    cur_mode, prev_mode;
  int          tx_frames, tx_bad;

  always @(posedge clk) begin
    if (rst_n) begin
      if (adc_timer[0][0]) rx[adc_timer[0][4:1]] <= ser_data;
      acc_sdo  <= acc_sdo | sdo;
      acc_trig <= acc_trig | trigger;
      if (int'(adc_timer[0]) == FRAME - 1) begin
        exp_data_next <= dut.tx_data;
        prev_mode     <= cur_mode;
        cur_mode      <= dut.sp.tx_mode;
        exp_flags_next <= (dut.sp.tx_mode == TX_SDO) ? (acc_sdo | sdo) : (acc_trig | trigger);
        exp_flags      <= exp_flags_next;
        exp_data      <= exp_data_next;
        acc_sdo       <= '0;
        acc_trig      <= '0;
      end
      if (int'(adc_timer[0]) == 1 && tx_frames >= 0 && cur_mode == prev_mode) begin
        // rx now holds the frame sent in the frame that just ended
        logic [13:0] v;
        v = '0;
        if (prev_mode == TX_DATA) begin
          for (int k = 0; k < 14; k++) v[data_slot[k]] = rx[k];
          if (v[9:0] != exp_data || v[13:11] != 3'b101) tx_bad++;
          else seen[M_TX_DATA]++;
        end else if (prev_mode != TX_OFF) begin
          for (int k = 0; k < 14; k++) v[flag_slot[k]] = rx[k];
          if (v[7:0] != exp_flags || v[13:8] != 6'b110100) tx_bad++;
          else if (v[7:0] != 0) seen[prev_mode == TX_SDO ? M_TX_SDO : M_TX_TRIG]++;
        end
        tx_frames++;
      end
    end
  end

  // ------------------------------------------------------------- programming
  task automatic load_params(input sys_params_t sp, input logic [FE_BITS-1:0] fe);
    logic [PREG_BITS-1:0] word;
    word = {fe, sp};
    for (int i = PREG_BITS - 1; i >= 0; i--) begin
      @(negedge clk);
      prog_shift = 1'b1; prog_din = word[i];
    end
    @(negedge clk);
    prog_shift = 1'b0; prog_load = 1'b1;
    @(negedge clk);
    prog_load = 1'b0;
  endtask

  function automatic logic [36:0] cd(int n, int tbin, int td, int tp);
    cd_params_t v;
    v.n = 4'(n); v.t_bin = 13'(tbin); v.t_d = 10'(td); v.t_pass = 10'(tp);
    return v;
  endfunction

  function automatic sd_params_t sd_std();
    sd_params_t s;
    s.l0 = 10'd592; s.l1 = 10'd432; s.l2 = 10'd612; s.l3 = 10'd912;
    s.l4 = 10'd112; s.l5 = 10'd412;
    s.t1 = 8'd1; s.t2 = 8'd3; s.t3 = 8'd5; s.t4 = 8'd7;
    s.t5 = 10'd8; s.t6 = 10'd10; s.t7 = 10'd12;
    return s;
  endfunction

  task automatic frames(input int n);
    repeat (n * FRAME) @(posedge clk);
  endtask

  // code of a function of PASS1..4, from its truth test
  function automatic logic [15:0] code_and(logic [3:0] need);
    logic [15:0] c;
    for (int i = 0; i < 16; i++) c[i] = ((4'(i) & need) == need);
    return c;
  endfunction

  sys_params_t sp;
  logic [FE_BITS-1:0] fe_word;

  initial begin
    int s2, f0, rejected;
    foreach (seen[i]) seen[i] = 0;
    sdo_q = '0; trig_q = '0; an_q = '0; ca_q = '0; adb_q = '0; sdb_q = '0; sb_q = '0;
    acc_sdo = '0; acc_trig = '0; tx_frames = -1; tx_bad = 0; rx = '0;
    cur_mode = TX_OFF; prev_mode = TX_OFF; exp_data = '0; exp_data_next = '0; exp_flags = '0; exp_flags_next = '0;
    clear();
    rst_n = 1'b0; prog_shift = 1'b0; prog_din = 1'b0; prog_load = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------------------------------------------------- phase A
    sp = '0;
    sp.clk_trim = 5'd16; sp.tx_mode = TX_DATA; sp.tx_ch = 3'd0; sp.tx_filtered = 1'b1;
    for (int m = 0; m < 2; m++) begin
      sp.mod[m].hpf_k16 = 1'b1;
      sp.mod[m].sd = sd_std();
      sp.mod[m].stim.biphasic = 1'b0; sp.mod[m].stim.n_pulses = 5'd1;
      sp.mod[m].stim.t_anodic = 10'd200; sp.mod[m].stim.t_discharge = 10'd300;
      sp.mod[m].stim_an.power_en = 1'b1;
    end
    // module 1: individual, 2 spikes within 8000 x 56 us = 0.448 s, T_D 25 ms
    for (int c = 0; c < NCH; c++) sp.mod[0].cd[c] = cd(2, 8000, 893, 536);
    sp.mod[0].dm.comb_code[3] = code_and(4'b0001);
    sp.mod[0].stim_an.dac_code = 6'd9;   // ~15 uA of ~100 uA full scale
    // module 2: sequential on PASS1 AND PASS4, T_D 10 ms, PASS 15 ms, 220 ms
    for (int c = 0; c < NCH; c++) sp.mod[1].cd[c] = cd(2, 8000, 357, 536);
    sp.mod[1].dm.pg_enable = 1'b1;
    sp.mod[1].dm.t_dstim = 14'd3929;
    sp.mod[1].dm.comb_code[3] = code_and(4'b1001);
    sp.mod[1].stim_an.dac_code = 6'd6;
    fe_word = FE_BITS'(64'h5A5A_1234_9876_ABCD);
    load_params(sp, fe_word);
    check(clk_trim == 5'd16 && fe_ctrl == fe_word, "static settings out of the register");
    check(stim_an[0].dac_code == 6'd9 && stim_an[1].dac_code == 6'd6, "DAC codes out");
    frames(300);   // highpass filters settle
    tx_frames = 0;
    clear();

    // module 1: a rejected waveform, then two lone spikes 0.5 s apart
    u_fe0.fire(0, 2);
    frames(20);
    rejected = (sdo_n[0] == 0);
    check(rejected, "positive-only waveform rejected");
    if (rejected) seen[M_REJECT]++;
    u_fe0.fire(0, 1);
    // module 2 experiment runs alongside: ch 1 and ch 4 pairs
    u_fe1.fire(0, 1); u_fe1.fire(3, 1);
    frames(15);
    u_fe1.fire(0, 1); u_fe1.fire(3, 1);
    frames(20);
    s2 = u_fe1.spike_frame[0];
    frames(17000);  // more than T_Bin = 8000 x 2 frames
    check(trig_n[3] == 0, "lone spike: no trigger");
    u_fe0.fire(0, 1);
    frames(2000);
    check(trig_n[3] == 0 && sdo_n[0] == 2, "second lone spike after T_Bin: bin had expired");
    if (trig_n[3] == 0 && sdo_n[0] == 2) seen[M_BIN_EXPIRY]++;
    frames(6000);   // module 2's Trigger4 is due ~24000 frames after its spikes
    // module 2 sequence: first trigger after T_D + step alignment,
    // then 2 x 3929 frames apart
    check(trig_n[4] == 1 && trig_at[4] - (s2 + 8) >= 357 && trig_at[4] - (s2 + 8) <= 359,
          $sformatf("module 2 Trigger1 T_D after the spikes (%0d)", trig_at[4] - s2 - 8));
    for (int c = 5; c < 8; c++)
      check(trig_n[c] == 1 && trig_at[c] - trig_at[c - 1] == 7858,
            $sformatf("module 2 Trigger%0d 220 ms after the previous (%0d)", c - 3, trig_at[c] - trig_at[c - 1]));
    check(sdo_n[4] == 2 && sdo_n[7] == 2, "module 2: no SDO during SEQ_BLK");
    if (trig_n[7] == 1) seen[M_SEQUENTIAL]++;
    frames(10000);  // let module 1's second lone spike bin expire
    clear();
    // module 1: the close pair
    u_fe0.fire(0, 1);
    frames(15);
    u_fe0.fire(0, 1);
    frames(2);
    s2 = u_fe0.spike_frame[0];
    frames(100);
    u_fe0.fire(0, 1);   // lands in ADB1
    frames(1000);
    check(trig_n[3] == 1 && trig_at[3] == s2 + 8 + 893,
          $sformatf("Trigger4 25 ms after the second spike (%0d frames)", trig_at[3] - s2 - 8));
    check(sdo_n[0] == 2, "spike during ADB not flagged");
    if (sdo_n[0] == 2) seen[M_BLANKED]++;
    check(an_n[3] == 1 && ca_n[3] == 0, "one monophasic pulse on stimulating ch 4");
    if (an_n[3] == 1 && ca_n[3] == 0) seen[M_MONO]++;
    if (trig_n[3] == 1) seen[M_INDIVIDUAL]++;
    check(trig_n[0] + trig_n[1] + trig_n[2] == 0, "module 1: only Trigger4");
    frames(600);   // PASS1 (15 ms) and ADB1 end

    // ---------------------------------------------------------- phase B
    sp.tx_mode = TX_TRIG;
    for (int c = 0; c < NCH; c++) sp.mod[0].cd[c] = cd(3, 8000, 714, 536);
    sp.mod[0].dm.pg_enable = 1'b1; sp.mod[0].dm.paired = 1'b1;
    sp.mod[0].dm.t_dstim = 14'd3571;
    sp.mod[0].dm.comb_code[3] = code_and(4'b0001);
    sp.mod[0].stim_an.dac_code = 6'd6;
    sp.mod[1].dm.pg_enable = 1'b0;
    for (int c = 0; c < NCH; c++) sp.mod[1].cd[c] = cd(1, 8000, 50, 20);
    sp.mod[1].dm.comb_code[1] = code_and(4'b0010);
    sp.mod[1].dm.comb_code[3] = 16'h0000;
    sp.mod[1].stim.biphasic = 1'b1; sp.mod[1].stim.n_pulses = 5'd3;
    sp.mod[1].stim.t_anodic = 10'd200; sp.mod[1].stim.t_cathodic = 10'd600;
    sp.mod[1].stim.t_discharge = 10'd100;
    load_params(sp, fe_word);
    frames(20);
    clear();
    u_fe0.fire(0, 1);
    u_fe1.fire(1, 1);
    frames(15);
    u_fe0.fire(0, 1);
    frames(15);
    u_fe0.fire(0, 1);
    frames(2);
    s2 = u_fe0.spike_frame[0];
    frames(1500);
    check(trig_n[5] == 1 && an_n[5] == 3 && ca_n[5] == 3, "module 2: biphasic train of 3 pulses");
    if (an_n[5] == 3) seen[M_TRAIN]++;
    frames(22000);
    check(trig_n[0] == 1 && trig_n[1] == 1 && trig_at[0] == trig_at[1], "paired: Trigger1,2 together");
    check(trig_at[0] - (s2 + 8) >= 714 && trig_at[0] - (s2 + 8) <= 716,
          $sformatf("paired: 20 ms after the third spike (%0d)", trig_at[0] - s2 - 8));
    check(trig_n[2] == 1 && trig_n[3] == 1 && trig_at[2] == trig_at[3], "paired: Trigger3,4 together");
    check(trig_at[2] - trig_at[0] == 3 * 7142, $sformatf("paired: 600 ms apart (%0d frames)", trig_at[2] - trig_at[0]));
    if (trig_n[2] == 1 && trig_at[2] == trig_at[3]) seen[M_PAIRED]++;

    // ---------------------------------------------------------- phase C
    sp.tx_mode = TX_SDO;
    load_params(sp, fe_word);
    frames(4);
    u_fe0.fire(1, 1); u_fe1.fire(2, 1);
    frames(30);
    u_fe0.fire(3, 1);
    frames(30);

    // ---------------------------------------------------------- phase D
    sp.mod[1].hpf_k16 = 1'b0;
    sp.mod[1].dm.pg_enable = 1'b1; sp.mod[1].dm.paired = 1'b0;
    sp.mod[1].dm.t_dstim = '0;
    sp.mod[1].dm.comb_code[3] = code_and(4'b0010);
    load_params(sp, fe_word);
    frames(300);   // filter settles at the new K
    clear();
    u_fe1.fire(1, 1);
    frames(20);
    s2 = u_fe1.spike_frame[1];
    frames(200);
    check(sdo_n[5] == 1 && trig_n[4] == 1 && trig_n[5] == 1 && trig_n[6] == 1 && trig_n[7] == 1,
          "simultaneous: one trigger on each of the four channels");
    check(trig_at[4] == trig_at[5] && trig_at[5] == trig_at[6] && trig_at[6] == trig_at[7],
          "simultaneous: all four in the same step");
    check(trig_at[4] - (s2 + 8) >= 50 && trig_at[4] - (s2 + 8) <= 52,
          $sformatf("simultaneous: T_D after the spike (%0d)", trig_at[4] - s2 - 8));
    check(seq_blk[1], "simultaneous: SEQ_BLK while the trains run");
    if (trig_n[7] == 1 && trig_at[4] == trig_at[7]) seen[M_SIMULTANEOUS]++;
    frames(1200);
    check(!seq_blk[1] && an_n[4] == 3 && an_n[7] == 3, "simultaneous: trains done, SEQ_BLK released");

    // ---------------------------------------------------------- summary
    check(tx_bad == 0, $sformatf("serial frames decoded (%0d bad of %0d)", tx_bad, tx_frames));
    for (int i = 0; i < M_COUNT; i++) begin
      mech_e e;
      e = mech_e'(i);
      $display("mechanism %-14s seen %0d times", e.name(), seen[i]);
      check(seen[i] > 0, $sformatf("mechanism %s happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
