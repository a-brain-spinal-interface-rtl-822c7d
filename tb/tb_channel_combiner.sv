// tb_channel_combiner: checks that each combination code acts as the truth
// table of a logic function of PASS1..4. Known functions are checked against
// the logic written out here (PASS1; PASS1 AND PASS2; any PASS; PASS1 AND NOT
// PASS4), over all 16 PASS patterns; then random codes on all four channels.
module tb_channel_combiner;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic [NCH-1:0]       pass, cco;
  logic [NCH-1:0][15:0] code;

  channel_combiner dut (.*);

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

  initial begin
    code[0] = 16'hAAAA;  // PASS1
    code[1] = 16'h8888;  // PASS1 & PASS2
    code[2] = 16'hFFFE;  // any PASS
    code[3] = 16'h00AA;  // PASS1 & !PASS4
    for (int v = 0; v < 16; v++) begin
      pass = 4'(v);
      #1;
      check(cco[0] == pass[0], "PASS1");
      check(cco[1] == (pass[0] & pass[1]), "PASS1 AND PASS2");
      check(cco[2] == (|pass), "any PASS");
      check(cco[3] == (pass[0] & !pass[3]), "PASS1 AND NOT PASS4");
    end
    for (int n = 0; n < 200; n++) begin
      for (int x = 0; x < NCH; x++) code[x] = 16'($urandom);
      pass = 4'($urandom);
      #1;
      for (int x = 0; x < NCH; x++)
        check(cco[x] == ((code[x] >> pass) & 16'd1) != 0, "random code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
