// tb_dsp_unit: one module's DSP unit fed by the behavioural front-end model.
// Discriminator settings as in the spike-discriminator test (threshold +-80
// around 512, windows for timer 1..3 and 5..7, SDO at timer 9), so a spike
// whose first sample arrives in frame s is flagged in frame s+8.
//  1. individual mode, code 4 = PASS1, N = 2, T_D = 5 frames: two spikes on
//     channel 1 give Trigger4 in frame s2+8+5 and one monophasic pulse on
//     stimulating channel 4; ADB1 then SDB1 blank channel 1, so a spike during
//     the blanking is not flagged; a rejected waveform on channel 2 gives no SDO.
//  2. sequential mode, code 4 = PASS1 OR PASS4, T_D_Stim = 4 (8 frames): two
//     spikes on channel 4 give Trigger1..4 eight frames apart, SEQ_BLK covers
//     them, and a spike on channel 1 during SEQ_BLK is not flagged.
module tb_dsp_unit;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                   rst_n;
  logic [ATW-1:0]         adc_timer;
  logic [NCH-1:0][DW-1:0] adc_data;
  dsp_params_t            p;
  logic [1:0]             tx_ch;
  logic [NCH-1:0]         sdo, pass, trigger, adb, sdb, anodic, cathodic, discharge, stim, int_clk;
  logic                   seq_blk, seq_trig, tx_sdo;
  logic [DW-1:0]          tx_raw, tx_filt;

  frontend_model u_fe (.clk, .rst_n, .adc_timer, .adc_data);
  dsp_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors: count rising edges and remember the frame of the latest one
  logic [NCH-1:0] sdo_q, trig_q, an_q;
  int sdo_n [NCH], sdo_at [NCH], trig_n [NCH], trig_at [NCH], an_n [NCH];
  int sdb_cycles [NCH], seqblk_cycles;
  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      if (sdo[c] && !sdo_q[c]) begin sdo_n[c]++; sdo_at[c] = u_fe.frame; end
      if (trigger[c] && !trig_q[c]) begin trig_n[c]++; trig_at[c] = u_fe.frame; end
      if (anodic[c] && !an_q[c]) an_n[c]++;
      if (sdb[c]) sdb_cycles[c]++;
    end
    if (seq_blk) seqblk_cycles++;
    sdo_q <= sdo; trig_q <= trigger; an_q <= anodic;
  end

  task automatic clear();
    for (int c = 0; c < NCH; c++) begin
      sdo_n[c] = 0; trig_n[c] = 0; an_n[c] = 0; sdb_cycles[c] = 0; sdo_at[c] = -1; trig_at[c] = -1;
    end
    seqblk_cycles = 0;
  endtask

  task automatic frames(input int n);
    repeat (n * FRAME) @(posedge clk);
  endtask

  function automatic logic [36:0] cd(int n, int tbin, int td, int tp);
    cd_params_t v;
    v.n = 4'(n); v.t_bin = 13'(tbin); v.t_d = 10'(td); v.t_pass = 10'(tp);
    return v;
  endfunction

  initial begin
    int s2;
    logic [15:0] or14;
    sdo_q = '0; trig_q = '0; an_q = '0;
    clear();
    rst_n = 1'b0; tx_ch = 2'd0;
    p = '0;
    p.hpf_k16 = 1'b1;
    p.sd.l0 = 10'd592; p.sd.l1 = 10'd432;
    p.sd.l2 = 10'd612; p.sd.l3 = 10'd912;
    p.sd.l4 = 10'd112; p.sd.l5 = 10'd412;
    p.sd.t1 = 8'd1; p.sd.t2 = 8'd3; p.sd.t3 = 8'd5; p.sd.t4 = 8'd7;
    p.sd.t5 = 10'd8; p.sd.t6 = 10'd10; p.sd.t7 = 10'd12;
    for (int c = 0; c < NCH; c++) p.cd[c] = cd(2, 100, 5, 3);
    p.dm.comb_code[3] = 16'hAAAA;
    p.dm.t_dstim = 14'd4;
    p.stim.biphasic = 1'b0; p.stim.n_pulses = 5'd1;
    p.stim.t_anodic = 10'd200; p.stim.t_discharge = 10'd100;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    frames(300);  // let the highpass filter settle
    clear();

    // 1: individual triggering
    u_fe.fire(0, 1);
    frames(15);
    u_fe.fire(0, 1);
    frames(2);
    s2 = u_fe.spike_frame[0];
    u_fe.fire(1, 2);
    frames(12);
    check(sdo_n[0] == 2 && sdo_at[0] == s2 + 8, $sformatf("SDO1 twice, last in frame s+8 (%0d, %0d vs %0d)", sdo_n[0], sdo_at[0], s2 + 8));
    check(sdo_n[1] == 0, "rejected waveform on channel 2");
    u_fe.fire(0, 1);  // arrives while ADB1 / SDB1 blank channel 1
    frames(30);
    check(trig_n[3] == 1 && trig_at[3] == s2 + 8 + 5, $sformatf("Trigger4 T_D after last spike (%0d vs %0d)", trig_at[3], s2 + 13));
    check(trig_n[0] + trig_n[1] + trig_n[2] == 0, "no other trigger");
    check(an_n[3] == 1, "one stimulus pulse on channel 4");
    check(sdb_cycles[0] > 250 && sdb_cycles[1] == 0, $sformatf("SDB1 during Stim4 (%0d)", sdb_cycles[0]));
    check(sdo_n[0] == 2, "spike during blanking not flagged");
    check(seqblk_cycles == 0, "no SEQ_BLK in individual mode");

    // 2: sequential triggering on PASS1 OR PASS4
    for (int i = 0; i < 16; i++) or14[i] = (i % 2 == 1) || (i >= 8);
    p.dm.comb_code[3] = or14;
    p.dm.pg_enable = 1'b1;
    frames(20);
    clear();
    u_fe.fire(3, 1);
    frames(15);
    u_fe.fire(3, 1);
    frames(20);
    u_fe.fire(0, 1);  // during SEQ_BLK
    frames(40);
    for (int c = 0; c < NCH; c++) check(trig_n[c] == 1, $sformatf("Trigger%0d once", c + 1));
    for (int c = 1; c < NCH; c++) check(trig_at[c] - trig_at[c - 1] == 8, "triggers 2 x T_D_Stim frames apart");
    check(sdo_n[3] == 2 && sdo_n[0] == 0, "spike on channel 1 blanked by SEQ_BLK");
    check(seqblk_cycles > 24 * FRAME, $sformatf("SEQ_BLK span %0d cycles", seqblk_cycles));
    for (int c = 0; c < NCH; c++) check(an_n[c] == 1, "one pulse per stimulating channel");
    check(!seq_blk && !seq_trig, "sequence over");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
