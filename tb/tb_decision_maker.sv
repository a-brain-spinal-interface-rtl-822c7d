// tb_decision_maker: runs the decision maker frame by frame with a simple
// stimulator stand-in (StimX high for 20 frames after each TriggerX rise).
//  1. individual mode, code 4 = PASS1, N = 2, T_D = 3, T_pass = 2: spikes on
//     channel 1 in frames 2 and 4 give PASS1 and Trigger4 in frames 7..8 only,
//     ADB1 from frame 4, then SDB1 while Stim4 is high; no other trigger.
//  2. sequential mode, code 4 = PASS1 AND PASS2, T_D_Stim = 2 (4 frames): one
//     channel alone triggers nothing; both channels (PASS1 AND PASS2 from
//     frame 8) give Trigger1..4 in frames 9, 13, 17, 21, and SEQ_BLK covers the sequence and Stim4.
//  3. paired mode: Trigger1,2 together, Trigger3,4 twelve frames later.
module tb_decision_maker;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n, tick, bin_tick, seq_blk, seq_trig;
  logic [NCH-1:0] sdo, stim, trigger, pass, adb, sdb;
  logic [NCH-1:0][$bits(cd_params_t)-1:0] cd_p;
  dm_params_t     p;
  logic [NCH-1:0][NCH-1:0] blank;

  decision_maker dut (.*);

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

  // stimulator stand-in
  int stim_left [NCH];
  logic [NCH-1:0] trig_q;
  int frame;
  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      if (trigger[c] && !trig_q[c]) stim_left[c] <= 20 * FRAME;
      else if (stim_left[c] > 0) stim_left[c] <= stim_left[c] - 1;
    end
    trig_q <= trigger;
  end
  always_comb for (int c = 0; c < NCH; c++) stim[c] = stim_left[c] > 0;

  int spk [NCH][$];
  int trig_first [NCH], pass_frames [NCH], sdb_frames [NCH], seqblk_frames;
  int adb1_first;

  task automatic run(input int n);
    foreach (trig_first[c]) begin trig_first[c] = -1; pass_frames[c] = 0; sdb_frames[c] = 0; end
    seqblk_frames = 0; adb1_first = -1;
    for (int f = 0; f < n; f++) begin
      for (int t = 0; t < FRAME; t++) begin
        @(negedge clk);
        for (int c = 0; c < NCH; c++) sdo[c] = (f inside {spk[c]});
        tick     = (t == 13);
        bin_tick = (t == 13) && (f % 2 == 1);
        for (int c = 0; c < NCH; c++) if (trigger[c] && trig_first[c] < 0) trig_first[c] = f;
      end
      for (int c = 0; c < NCH; c++) begin
        if (pass[c]) pass_frames[c]++;
        if (sdb[c]) sdb_frames[c]++;
      end
      if (adb[0] && adb1_first < 0) adb1_first = f;
      if (seq_blk) seqblk_frames++;
    end
  endtask

  function automatic logic [36:0] cd(int n, int tbin, int td, int tp);
    cd_params_t v;
    v.n = 4'(n); v.t_bin = 13'(tbin); v.t_d = 10'(td); v.t_pass = 10'(tp);
    return v;
  endfunction

  initial begin
    rst_n = 1'b0; tick = 1'b0; bin_tick = 1'b0; sdo = '0;
    foreach (stim_left[c]) stim_left[c] = 0;
    for (int c = 0; c < NCH; c++) cd_p[c] = cd(2, 100, 3, 2);
    p.pg_enable = 1'b0; p.paired = 1'b0; p.t_dstim = 14'd2;
    p.comb_code[0] = 16'h0000; p.comb_code[1] = 16'h0000;
    p.comb_code[2] = 16'h0000; p.comb_code[3] = 16'hAAAA;
    repeat (2) @(negedge clk); rst_n = 1'b1;

    // 1: individual
    spk[0] = '{2, 4};
    run(40);
    check(trig_first[3] == 7, $sformatf("Trigger4 at frame 7 (%0d)", trig_first[3]));
    check(pass_frames[0] == 2, "PASS1 for T_pass frames");
    check(trig_first[0] < 0 && trig_first[1] < 0 && trig_first[2] < 0, "other triggers quiet");
    check(adb1_first == 4, "ADB1 from the second spike");
    check(sdb_frames[0] >= 19 && sdb_frames[1] == 0 && sdb_frames[2] == 0 && sdb_frames[3] == 0,
          $sformatf("SDB1 only, during Stim4 (%0d)", sdb_frames[0]));
    check(seqblk_frames == 0, "no SEQ_BLK in individual mode");

    // 2: sequential, AND of channels 1 and 2
    p.pg_enable = 1'b1; p.comb_code[3] = 16'h8888;
    spk[0] = '{2, 4}; spk[1] = '{};
    run(40);
    foreach (trig_first[c]) check(trig_first[c] < 0, "one channel alone: no trigger");
    spk[0] = '{2, 4}; spk[1] = '{3, 5};
    run(60);
    for (int c = 0; c < NCH; c++)
      check(trig_first[c] == 9 + 4 * c,
            $sformatf("sequential Trigger%0d at frame %0d", c + 1, trig_first[c]));
    check(seqblk_frames >= 13 + 20 && seqblk_frames <= 13 + 22, $sformatf("SEQ_BLK span %0d", seqblk_frames));
    foreach (sdb_frames[c]) check(sdb_frames[c] == 0, "no SDB in sequential mode");

    // 3: paired
    p.paired = 1'b1;
    run(60);
    check(trig_first[0] == trig_first[1] && trig_first[0] >= 8, "paired: 1,2 together");
    check(trig_first[2] == trig_first[3] && trig_first[2] - trig_first[0] == 12, "paired: 3,4 after 3 x T_D_Stim");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
