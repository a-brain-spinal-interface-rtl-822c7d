// tb_pattern_generator: measures, in 56 us steps, when each trigger fires
// after a rising CCO4 edge. Expected: the sequence starts at the first 56 us
// tick after the edge (step 1); sequential mode Trigger k (k-1) x T_D_Stim
// later; paired mode 1,2 at 0 and 3,4 at 3 x T_D_Stim; T_D_Stim = 0
// all together; one pulse per trigger; CCO4 edges during a sequence ignored;
// nothing when the generator is disabled. seq_trig must span the sequence.
module tb_pattern_generator;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n, enable, paired, tick56, cco4, seq_trig;
  logic [13:0]    t_dstim;
  logic [NCH-1:0] pgo;

  pattern_generator dut (.*);

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

  int step;  // 56 us steps since start
  always @(posedge clk) if (tick56) step <= step + 1;

  int first [NCH];
  int pulses [NCH];
  int seq_len;
  logic [NCH-1:0] pgo_q;

  task automatic run_sequence(input bit pr, input int td, input bit en, input bit retrig);
    paired = pr; t_dstim = 14'(td); enable = en;
    foreach (first[k]) begin first[k] = -1; pulses[k] = 0; end
    seq_len = 0; pgo_q = '0;
    @(negedge clk); cco4 = 1'b1;
    step = 0;
    for (int cyc = 0; cyc < 56 * (3 * td + 6); cyc++) begin
      @(negedge clk);
      tick56 = (cyc % 56 == 55);
      if (cyc == 56 * 2) cco4 = 1'b0;
      if (retrig && cyc == 56 * 3) cco4 = 1'b1;
      for (int k = 0; k < NCH; k++) begin
        if (pgo[k] && !pgo_q[k]) begin
          pulses[k]++;
          if (first[k] < 0) first[k] = step;
        end
      end
      pgo_q = pgo;
      if (seq_trig) seq_len++;
    end
    tick56 = 1'b0; cco4 = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; enable = 1'b0; paired = 1'b0; tick56 = 1'b0; cco4 = 1'b0; t_dstim = '0;
    @(negedge clk); rst_n = 1'b1;

    run_sequence(1'b0, 4, 1'b1, 1'b1);
    for (int k = 0; k < NCH; k++) begin
      check(first[k] == 1 + 4 * k, $sformatf("sequential Trigger%0d at %0d steps (got %0d)", k + 1, 1 + 4 * k, first[k]));
      check(pulses[k] == 1, "one pulse each, re-trigger ignored");
    end
    check(seq_len > 56 * 13 && seq_len <= 56 * 14, $sformatf("seq_trig length %0d", seq_len));

    run_sequence(1'b1, 3, 1'b1, 1'b0);
    check(first[0] == 1 && first[1] == 1, "paired: 1,2 at start");
    check(first[2] == 10 && first[3] == 10, "paired: 3,4 after 3 x T_D_Stim");

    run_sequence(1'b0, 0, 1'b1, 1'b0);
    for (int k = 0; k < NCH; k++) check(first[k] == 1 && pulses[k] == 1, "T_D_Stim = 0: simultaneous");

    run_sequence(1'b0, 2, 1'b0, 1'b0);
    for (int k = 0; k < NCH; k++) check(pulses[k] == 0, "disabled");
    check(seq_len == 0, "no seq_trig when disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
