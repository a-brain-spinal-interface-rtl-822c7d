// tb_stimulator_controller: measures the pulse trains cycle by cycle.
// Biphasic train of 3 pulses (anodic 200, cathodic 600, discharge 50 clocks)
// on channel 3: anodic rises 8192 clocks apart (122 Hz at 1 MHz), each phase
// has its programmed length and follows the previous one, Stim lasts
// 2 x 8192 + 850 clocks. Monophasic single pulse (anodic 200, passive
// discharge 100) on channels 1 and 4 together. A trigger during a train is
// ignored; n_pulses = 0 gives no train; idle channels stay quiet.
module tb_stimulator_controller;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n;
  logic [NCH-1:0] trigger, anodic, cathodic, discharge, stim;
  stim_params_t   p;

  stimulator_controller dut (.*);

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

  int n_an [NCH], n_ca [NCH], n_dis [NCH], n_stim [NCH], an_rises [NCH];
  int an_rise_at [NCH][$];
  logic [NCH-1:0] an_q;
  int cyc;

  task automatic run(input logic [NCH-1:0] trig, input int cycles, input int retrig_at);
    foreach (n_an[c]) begin
      n_an[c] = 0; n_ca[c] = 0; n_dis[c] = 0; n_stim[c] = 0; an_rises[c] = 0;
      an_rise_at[c].delete();
    end
    an_q = '0;
    @(negedge clk); trigger = trig;
    for (cyc = 0; cyc < cycles; cyc++) begin
      @(negedge clk);
      if (cyc == 10) trigger = '0;
      if (cyc == retrig_at) trigger = trig;
      if (cyc == retrig_at + 10) trigger = '0;
      for (int c = 0; c < NCH; c++) begin
        check(int'(anodic[c]) + int'(cathodic[c]) + int'(discharge[c]) <= 1, "one phase at a time");
        if (anodic[c]) n_an[c]++;
        if (cathodic[c]) n_ca[c]++;
        if (discharge[c]) n_dis[c]++;
        if (stim[c]) n_stim[c]++;
        if (anodic[c] && !an_q[c]) begin an_rises[c]++; an_rise_at[c].push_back(cyc); end
        if (cathodic[c]) check(!stim[c] || n_an[c] > 0, "cathodic after anodic");
      end
      an_q = anodic;
    end
  endtask

  initial begin
    rst_n = 1'b0; trigger = '0;
    p.biphasic = 1'b1; p.n_pulses = 5'd3;
    p.t_anodic = 10'd200; p.t_cathodic = 10'd600; p.t_discharge = 10'd50;
    @(negedge clk); rst_n = 1'b1;

    run(4'b0100, 30000, 5000);
    check(an_rises[2] == 3, $sformatf("3 pulses (%0d)", an_rises[2]));
    if (an_rises[2] == 3) begin
      check(an_rise_at[2][1] - an_rise_at[2][0] == 8192, "pulse period 8192 clocks");
      check(an_rise_at[2][2] - an_rise_at[2][1] == 8192, "pulse period 8192 clocks");
    end
    check(n_an[2] == 3 * 200, $sformatf("anodic clocks %0d", n_an[2]));
    check(n_ca[2] == 3 * 600, $sformatf("cathodic clocks %0d", n_ca[2]));
    check(n_dis[2] == 3 * 50, $sformatf("discharge clocks %0d", n_dis[2]));
    check(n_stim[2] == 2 * 8192 + 850, $sformatf("Stim3 length %0d", n_stim[2]));
    check(n_stim[0] == 0 && n_stim[1] == 0 && n_stim[3] == 0, "other channels idle");

    p.biphasic = 1'b0; p.n_pulses = 5'd1; p.t_discharge = 10'd100;
    run(4'b1001, 2000, -100);
    for (int c = 0; c < NCH; c += 3) begin
      check(an_rises[c] == 1 && n_an[c] == 200, "monophasic anodic");
      check(n_ca[c] == 0, "monophasic: no cathodic phase");
      check(n_dis[c] == 100, "passive discharge");
      check(n_stim[c] == 300, $sformatf("Stim length %0d", n_stim[c]));
    end

    p.n_pulses = 5'd0;
    run(4'b1111, 2000, -100);
    for (int c = 0; c < NCH; c++) check(n_stim[c] == 0, "n_pulses = 0: no train");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
