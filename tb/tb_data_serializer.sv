// tb_data_serializer: decodes the serial stream with the slot tables written
// out here (the bit order of the three frame formats) and checks that frame
// n+1 carries what was presented in frame n: the 10-bit sample, its SDO flag
// and the 3-bit preamble in data mode; eight SDO or trigger flags, given as
// one-cycle pulses, and the 6-bit preamble in the other modes. Also checks
// that the serial clock runs at half the system clock (14 bits per frame).
module tb_data_serializer;
  import bsi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n, data_sdo, ser_clk, ser_data;
  logic [ATW-1:0] adc_timer;
  tx_mode_e       mode;
  logic [DW-1:0]  data;
  logic [7:0]     sdo, trig;

  data_serializer dut (.*);

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

  // slot tables: what each of the 14 bits carries.
  // data mode: 0..9 = D0..D9, 10 = SDO, 11..13 = PA0..PA2
  int data_slot [14] = '{8, 7, 2, 6, 5, 3, 4, 13, 12, 11, 0, 10, 9, 1};
  // flag modes: 0..7 = flag 1..8, 8..13 = PA0..PA5
  int flag_slot [14] = '{6, 5, 4, 3, 2, 1, 0, 13, 12, 11, 10, 9, 8, 7};

  logic [13:0] rx;       // bits received in the current frame, by slot
  logic [9:0]  d_prev;
  logic        s_prev;
  logic [7:0]  f_prev;
  int          clk_edges;

  initial begin
    rst_n = 1'b0; adc_timer = '0; mode = TX_DATA; data = '0; data_sdo = 1'b0;
    sdo = '0; trig = '0; clk_edges = 0;
    @(negedge clk); rst_n = 1'b1;
    for (int f = 0; f < 40; f++) begin
      logic [9:0] d_now;
      logic       s_now;
      logic [7:0] f_now;
      tx_mode_e   m;
      m = (f < 14) ? TX_DATA : (f < 27) ? TX_SDO : TX_TRIG;
      d_now = 10'($urandom);
      s_now = 1'($urandom);
      f_now = 8'($urandom);
      for (int t = 0; t < FRAME; t++) begin
        @(negedge clk);
        // mode switches take effect at a frame boundary
        if (t == 0) mode = m;
        adc_timer = 5'(t);
        data = d_now;
        data_sdo = s_now && (t == 6);
        sdo  = (m == TX_SDO && t == 9) ? f_now : 8'h00;
        trig = (m == TX_TRIG && t == 17) ? f_now : 8'h00;
        #1;
        if (t % 2 == 1) begin
          check(ser_clk, "ser_clk high in the second half of a bit");
          clk_edges++;
          rx[t / 2] = ser_data;
        end else check(!ser_clk, "ser_clk low in the first half of a bit");
      end
      // frame f carried what was presented in frame f-1 (same mode)
      if (f > 0 && f != 14 && f != 27) begin
        if (m == TX_DATA) begin
          logic [13:0] v;
          for (int k = 0; k < 14; k++) v[data_slot[k]] = rx[k];
          check(v[9:0] == d_prev, $sformatf("data frame %0d: %h vs %h", f, v[9:0], d_prev));
          check(v[10] == s_prev, "data SDO bit");
          check(v[13:11] == 3'b101, "3b preamble");
        end else begin
          logic [13:0] v;
          for (int k = 0; k < 14; k++) v[flag_slot[k]] = rx[k];
          check(v[7:0] == f_prev, $sformatf("flag frame %0d: %h vs %h", f, v[7:0], f_prev));
          check(v[13:8] == 6'b110100, "6b preamble");
        end
      end
      d_prev = d_now; s_prev = s_now; f_prev = f_now;
    end
    check(clk_edges == 40 * 14, "14 serial bits per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
