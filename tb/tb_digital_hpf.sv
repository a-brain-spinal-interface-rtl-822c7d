// tb_digital_hpf: checks the time-multiplexed highpass filter.
//  - random samples on four interleaved channels against an integer model of
//    w[n] = x[n] + w[n-1] - w[n-1]/2^s, y[n] = sat(w[n] - w[n-1] + 512);
//  - a constant input settles to mid-scale 512 (the DC is removed);
//  - a step decays faster with K = 1/8 than with K = 1/16;
//  - a full-scale step saturates at 1023 and a falling one at 0;
//  - the output appears one cycle after en.
module tb_digital_hpf;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, en, k16, y_valid;
  logic [1:0]    ch, y_ch;
  logic [DW-1:0] x, y;

  digital_hpf dut (.*);

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

  int w_model [NCH];

  // one filter step of channel c in the model; returns expected y
  function automatic int model(int c, int xin, bit k_is_16);
    int wp, wn, d;
    wp = w_model[c];
    wn = xin + wp - (k_is_16 ? wp / 16 : wp / 8);
    d  = wn - wp + 512;
    w_model[c] = wn;
    if (d < 0) d = 0;
    if (d > 1023) d = 1023;
    return d;
  endfunction

  task automatic step(input int c, input int xin, output int yout);
    @(negedge clk);
    en = 1'b1; ch = 2'(c); x = DW'(xin);
    @(negedge clk);
    en = 1'b0;
    check(y_valid && y_ch == 2'(c), "valid one cycle after en");
    yout = int'(y);
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCH; c++) w_model[c] = 0;
  endtask

  initial begin
    int yo, e, y8_after, y16_after;
    en = 1'b0; ch = '0; x = '0; k16 = 1'b1;
    do_reset();
    // random interleaved data, both K settings
    for (int k = 0; k < 2; k++) begin
      k16 = (k == 0);
      for (int n = 0; n < 400; n++) begin
        int c, xi;
        c  = n % NCH;
        xi = 400 + int'($urandom_range(0, 220));
        e  = model(c, xi, k16);
        step(c, xi, yo);
        check(yo == e, $sformatf("model ch%0d n=%0d got %0d exp %0d", c, n, yo, e));
      end
    end
    // DC removal: 300 samples of 700 settle to 512 +- 1
    do_reset(); k16 = 1'b1;
    for (int n = 0; n < 300; n++) step(0, 700, yo);
    check(yo >= 511 && yo <= 513, $sformatf("DC settles to 512, got %0d", yo));
    // step response: +100 on a settled channel, after 8 samples
    for (int kk = 0; kk < 2; kk++) begin
      do_reset(); k16 = (kk == 0);
      for (int n = 0; n < 300; n++) step(1, 500, yo);
      step(1, 600, yo);
      check(yo >= 605 && yo <= 612, $sformatf("step jump %0d", yo));
      for (int n = 0; n < 8; n++) step(1, 600, yo);
      if (k16) y16_after = yo; else y8_after = yo;
    end
    // 8 samples after the step: 100*(15/16)^9 ~ 56, 100*(7/8)^9 ~ 30
    check(y16_after > 560 && y16_after < 575, $sformatf("K=1/16 decay %0d", y16_after));
    check(y8_after > 535 && y8_after < 550, $sformatf("K=1/8 decay %0d", y8_after));
    check(y8_after < y16_after, "K=1/8 has the higher cutoff");
    // saturation
    do_reset(); k16 = 1'b1;
    for (int n = 0; n < 300; n++) step(2, 0, yo);
    step(2, 1023, yo);
    check(yo == 1023, "overflow saturates at 1023");
    for (int n = 0; n < 300; n++) step(2, 1023, yo);
    step(2, 0, yo);
    check(yo == 0, "underflow saturates at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
