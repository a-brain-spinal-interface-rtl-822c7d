// tb_spike_discriminator: frame-by-frame check of the threshold and the two
// time-amplitude windows, with expectations worked out from the settings:
//   L0 = 592, L1 = 432, window 1 = 612..912 for timer 1..3,
//   window 2 = 112..432 for timer 5..7, T5 = 8, T6 = 10, T7 = 12.
// A sample crossing the threshold in frame f0 starts the timer; a spike that
// stays in both windows gives SDO high for exactly one frame, the one
// evaluated at f0+8 (timer becomes 9), and the timer is back at 0 after f0+12.
// Cases: accepted positive spike, negative-threshold start, spike leaving
// window 1, spike missing window 2, ADB / SDB blanking, SEQ_BLK, and
// independence of the four channels.
module tb_spike_discriminator;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n, en, seq_blk;
  logic [1:0]     ch;
  logic [DW-1:0]  x;
  logic [NCH-1:0] adb, sdb, sdo;
  sd_params_t     p;
  logic [9:0]     timer [NCH];

  spike_discriminator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // spike shapes, offsets from 512, sample k evaluated with timer k
  int good [14] = '{150, 250, 250, 200, 0, -150, -200, -200, -150, -50, 0, 0, 0, 0};
  int neg  [14] = '{-120, 200, 200, 150, 0, -150, -150, -150, 0, 0, 0, 0, 0, 0};
  int bad1 [14] = '{150, 250, 450, 200, 0, -150, -200, -200, -150, -50, 0, 0, 0, 0};
  int bad2 [14] = '{150, 250, 250, 200, 100, 50, 20, 0, 0, 0, 0, 0, 0, 0};

  int shape [NCH];   // 0 none, 1 good, 2 neg, 3 bad1, 4 bad2
  int start [NCH];   // frame of threshold crossing
  int sdo_frames [NCH];
  int sdo_first [NCH];

  function automatic int sample(int c, int f);
    int k;
    k = f - start[c];
    if (shape[c] == 0 || k < 0 || k >= 14) return 512;
    case (shape[c])
      1: return 512 + good[k];
      2: return 512 + neg[k];
      3: return 512 + bad1[k];
      default: return 512 + bad2[k];
    endcase
  endfunction

  // run frames f0..f1-1: each frame evaluates channels 1..4 once
  task automatic run_frames(input int f0, input int f1);
    for (int f = f0; f < f1; f++) begin
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        en = 1'b1; ch = 2'(c); x = DW'(sample(c, f));
        @(negedge clk);
        en = 1'b0;
        if (sdo[c]) begin
          if (sdo_frames[c] == 0) sdo_first[c] = f;
          sdo_frames[c]++;
        end
      end
      repeat (3) @(negedge clk);
    end
  endtask

  task automatic clear_stats();
    for (int c = 0; c < NCH; c++) begin sdo_frames[c] = 0; sdo_first[c] = -1; end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; ch = '0; x = 10'd512; seq_blk = 1'b0; adb = '0; sdb = '0;
    p.l0 = 10'd592; p.l1 = 10'd432;
    p.l2 = 10'd612; p.l3 = 10'd912;
    p.l4 = 10'd112; p.l5 = 10'd432;
    p.t1 = 8'd1; p.t2 = 8'd3; p.t3 = 8'd5; p.t4 = 8'd7;
    p.t5 = 10'd8; p.t6 = 10'd10; p.t7 = 10'd12;
    @(negedge clk); rst_n = 1'b1;

    // 1: good spike on ch1, negative-start spike on ch2, bad1 on ch3, bad2 on ch4
    shape = '{1, 2, 3, 4};
    start = '{2, 3, 2, 4};
    clear_stats();
    run_frames(0, 30);
    check(sdo_frames[0] == 1 && sdo_first[0] == 2 + 8, $sformatf("ch1 accepted at f0+8 (%0d,%0d)", sdo_frames[0], sdo_first[0]));
    check(sdo_frames[1] == 1 && sdo_first[1] == 3 + 8, "ch2 accepted after negative threshold");
    check(sdo_frames[2] == 0, "ch3 rejected: left window 1");
    check(sdo_frames[3] == 0, "ch4 rejected: missed window 2");
    for (int c = 0; c < NCH; c++) check(timer[c] == 0, "timers back to 0");

    // 2: ADB on ch1 and SDB on ch2 during their spikes, ch3 good unblanked
    shape = '{1, 1, 1, 0};
    start = '{32, 32, 32, 0};
    clear_stats();
    run_frames(30, 36);
    adb[0] = 1'b1; sdb[1] = 1'b1;
    run_frames(36, 38);
    check(timer[0] == 0 && timer[1] == 0, "blanking holds timers at 0");
    adb = '0; sdb = '0;
    run_frames(38, 60);
    check(sdo_frames[0] == 0, "ADB blanks ch1");
    check(sdo_frames[1] == 0, "SDB blanks ch2");
    check(sdo_frames[2] == 1 && sdo_first[2] == 40, "ch3 unaffected");

    // 3: SEQ_BLK: input held at 512 so a spike is not seen
    shape = '{1, 1, 1, 1};
    start = '{61, 61, 61, 61};
    clear_stats();
    seq_blk = 1'b1;
    run_frames(60, 80);
    seq_blk = 1'b0;
    for (int c = 0; c < NCH; c++) check(sdo_frames[c] == 0, "SEQ_BLK blanks all");

    // 4: a second good spike after blanking is accepted again
    start = '{81, 82, 83, 84};
    clear_stats();
    run_frames(80, 100);
    for (int c = 0; c < NCH; c++)
      check(sdo_frames[c] == 1 && sdo_first[c] == 89 + c, $sformatf("ch%0d accepted again", c + 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
