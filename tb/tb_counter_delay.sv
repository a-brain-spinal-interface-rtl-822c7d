// tb_counter_delay: checks spike counting within a bin, PASS delay and
// duration, ADB span and bin expiry, frame by frame. Settings N = 3,
// T_Bin = 10 (x 56 us = 20 frames), T_D = 5 frames, T_pass = 4 frames.
// Expected, worked out from those numbers: the third spike in frame c raises
// ADB in frame c, PASS in frames c+5..c+8, and both fall after frame c+8.
// Spikes spread over more than the bin do not pass; spikes during ADB are
// ignored. A second part checks N = 1, and N = 0 (disabled).
module tb_counter_delay;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, tick, bin_tick, sdo, pass, adb;
  cd_params_t p;

  counter_delay dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int spikes [$];
  bit exp_pass [200];
  bit exp_adb  [200];
  int pass_frames, adb_frames;

  // run frames 0..n-1, tick in cycle 13 of 28, bin_tick on odd frames
  task automatic run(input int n);
    for (int f = 0; f < n; f++) begin
      for (int t = 0; t < FRAME; t++) begin
        @(negedge clk);
        sdo      = (f inside {spikes}) && t < 20;
        tick     = (t == 13);
        bin_tick = (t == 13) && (f % 2 == 1);
      end
      check(pass == exp_pass[f], $sformatf("pass in frame %0d", f));
      check(adb == exp_adb[f], $sformatf("adb in frame %0d", f));
      if (pass) pass_frames++;
      if (adb) adb_frames++;
    end
  endtask

  initial begin
    rst_n = 1'b0; tick = 1'b0; bin_tick = 1'b0; sdo = 1'b0;
    p.n = 4'd3; p.t_bin = 13'd10; p.t_d = 10'd5; p.t_pass = 10'd4;
    pass_frames = 0; adb_frames = 0;
    @(negedge clk); rst_n = 1'b1;
    // 2,6,10 pass; 14 ignored (ADB); 30,45 then bin expires; 55,57,59 pass; 61 ignored
    spikes = '{2, 6, 10, 14, 30, 45, 55, 57, 59, 61};
    foreach (exp_pass[i]) begin exp_pass[i] = 0; exp_adb[i] = 0; end
    for (int f = 10; f <= 18; f++) exp_adb[f] = 1;
    for (int f = 15; f <= 18; f++) exp_pass[f] = 1;
    for (int f = 59; f <= 67; f++) exp_adb[f] = 1;
    for (int f = 64; f <= 67; f++) exp_pass[f] = 1;
    run(100);
    check(pass_frames == 8, "PASS lasted 2 x T_pass frames");

    // N = 1: PASS T_D frames after a single spike; N = 0: nothing
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    p.n = 4'd1; p.t_d = 10'd3; p.t_pass = 10'd2;
    spikes = '{5};
    foreach (exp_pass[i]) begin exp_pass[i] = 0; exp_adb[i] = 0; end
    for (int f = 5; f <= 9; f++) exp_adb[f] = 1;
    for (int f = 8; f <= 9; f++) exp_pass[f] = 1;
    run(20);
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    p.n = 4'd0;
    foreach (exp_pass[i]) begin exp_pass[i] = 0; exp_adb[i] = 0; end
    run(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
