// tb_dsp_control_unit: checks the DSP time-slot generator against the slot
// plan worked out here: channel c filtered at ADC timer 1+3c, discriminated at
// 2+3c, internal clock high on both, frame tick at 13 once per 28 cycles,
// bin tick on every second frame tick, everything but the ticks off while
// seq_blk is high.
module tb_dsp_control_unit;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n, seq_blk;
  logic [ATW-1:0] adc_timer;
  logic [1:0]     ch_sel;
  logic           hpf_en, sd_en, frame_tick, bin_tick;
  logic [NCH-1:0] int_clk;

  dsp_control_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (timer=%0d)", what, adc_timer);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ticks, nbin, last_tick_cycle, cycle;

  initial begin
    rst_n = 1'b0; seq_blk = 1'b0; adc_timer = '0;
    ticks = 0; nbin = 0; last_tick_cycle = -1; cycle = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 8; f++) begin
      seq_blk = (f == 5);
      for (int t = 0; t < FRAME; t++) begin
        int exp_ch, exp_ph;
        bit in_slot;
        @(negedge clk);
        adc_timer = 5'(t);
        #1;
        in_slot = (t >= 1 && t <= 12);
        exp_ch  = (t - 1) / 3;
        exp_ph  = (t - 1) % 3;
        if (in_slot) check(ch_sel == 2'(exp_ch), "ch_sel");
        check(hpf_en == (in_slot && exp_ph == 0 && !seq_blk), "hpf_en");
        check(sd_en  == (in_slot && exp_ph == 1 && !seq_blk), "sd_en");
        for (int c = 0; c < NCH; c++)
          check(int_clk[c] == (in_slot && exp_ch == c && exp_ph != 2 && !seq_blk), "int_clk");
        check(frame_tick == (t == 13), "frame_tick");
        if (frame_tick) begin
          if (last_tick_cycle >= 0) check(cycle - last_tick_cycle == FRAME, "frame period 28 cycles");
          last_tick_cycle = cycle;
          ticks++;
          if (bin_tick) nbin++;
          check(bin_tick == (ticks % 2 == 0), "bin_tick every second frame");
        end else check(!bin_tick, "bin_tick only with frame_tick");
        cycle++;
      end
    end
    check(ticks == 8 && nbin == 4, "tick counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
