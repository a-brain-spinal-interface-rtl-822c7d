// tb_blanking_control_unit: checks the BlankXY lookup table on codes whose
// dependence on each PASS is known by hand, SDB = OR(BlankXY AND StimX) for
// all Stim patterns in individual mode, SDB off in sequential mode,
// SEQ_BLK = PG_Enable AND (SEQ_TRIG OR Stim4), and ADB passed through.
module tb_blanking_control_unit;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic [NCH-1:0][15:0]    code;
  logic [NCH-1:0]          stim, adb_in, adb, sdb;
  logic                    pg_enable, seq_trig, seq_blk;
  logic [NCH-1:0][NCH-1:0] blank;

  blanking_control_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channels each code depends on, by hand
  logic [NCH-1:0] dep [4];

  initial begin
    code[0] = 16'hAAAA; dep[0] = 4'b0001;  // PASS1
    code[1] = 16'h0000; dep[1] = 4'b0000;  // never
    code[2] = 16'hF0F0; dep[2] = 4'b0100;  // PASS3
    code[3] = 16'h8888; dep[3] = 4'b0011;  // PASS1 AND PASS2
    pg_enable = 1'b0; seq_trig = 1'b0; stim = '0; adb_in = '0;
    #1;
    for (int x = 0; x < NCH; x++) check(blank[x] == dep[x], $sformatf("Blank%0dY", x + 1));
    for (int s = 0; s < 16; s++) begin
      logic [NCH-1:0] e;
      stim = 4'(s);
      e = '0;
      for (int x = 0; x < NCH; x++) if (stim[x]) e |= dep[x];
      pg_enable = 1'b0; #1;
      check(sdb == e, $sformatf("SDB for stim %b", stim));
      check(!seq_blk, "no SEQ_BLK in individual mode");
      pg_enable = 1'b1;
      for (int t = 0; t < 2; t++) begin
        seq_trig = t[0]; #1;
        check(sdb == '0, "no SDB in sequential mode");
        check(seq_blk == (seq_trig || stim[3]), "SEQ_BLK");
      end
      seq_trig = 1'b0;
    end
    adb_in = 4'b1010; #1;
    check(adb == 4'b1010, "ADB passes through");
    code[2] = 16'hFFFE; #1;
    check(blank[2] == 4'b1111, "any-PASS code blanks all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
