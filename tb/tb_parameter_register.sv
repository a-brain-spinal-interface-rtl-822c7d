// tb_parameter_register: shifts a random 874-bit word in MSB first, checks
// that the outputs keep the old word until load, then hold the new word
// exactly, and that the word comes back out of dout bit for bit while a
// second word is shifted in.
module tb_parameter_register;

  localparam int W = 874;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, shift_en, din, load, dout;
  logic [W-1:0] q;

  parameter_register dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] w1, w2;

  initial begin
    rst_n = 1'b0; shift_en = 1'b0; din = 1'b0; load = 1'b0;
    for (int i = 0; i < W; i++) begin w1[i] = 1'($urandom); w2[i] = 1'($urandom); end
    @(negedge clk); rst_n = 1'b1;
    check(q == '0, "cleared by reset");
    for (int i = W - 1; i >= 0; i--) begin
      shift_en = 1'b1; din = w1[i];
      @(negedge clk);
    end
    shift_en = 1'b0;
    check(q == '0, "outputs unchanged before load");
    load = 1'b1; @(negedge clk); load = 1'b0;
    check(q == w1, "word 1 loaded");
    for (int i = W - 1; i >= 0; i--) begin
      check(dout == w1[i], "word 1 shifted out MSB first");
      shift_en = 1'b1; din = w2[i];
      @(negedge clk);
    end
    shift_en = 1'b0;
    check(q == w1, "word 1 held while shifting");
    load = 1'b1; @(negedge clk); load = 1'b0;
    check(q == w2, "word 2 loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
