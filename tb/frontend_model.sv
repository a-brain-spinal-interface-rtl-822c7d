// frontend_model: behavioural stand-in for one module's recording front-end
// (amplifiers, filters and four SAR ADCs), for testbenches only.
// It counts the 5-bit ADC timer 0..27 on the system clock and, at the start of
// every 28-cycle conversion frame, presents a new 10-bit code per channel:
// mid-scale 512 plus +-3 counts of noise, or, after fire(), one extracellular
// spike waveform sampled once per frame (offsets from 512 listed below).
//   kind 1: biphasic spike that passes threshold and both windows of the
//           testbench settings (positive lobe, then negative lobe)
//   kind 2: positive-only event that misses the second window (rejected)
// spike_frame[c] is the frame in which channel c's last spike began.
module frontend_model
  import bsi_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [ATW-1:0]         adc_timer,
  output logic [NCH-1:0][DW-1:0] adc_data
);

  int good [10] = '{150, 250, 250, 200, 0, -150, -200, -200, -150, -50};
  int bad  [10] = '{150, 250, 250, 200, 100, 50, 20, 0, 0, 0};

  int frame;
  int kind [NCH];
  int pos  [NCH];
  int pend [NCH];
  int spike_frame [NCH];

  initial begin
    frame = 0;
    for (int c = 0; c < NCH; c++) begin
      kind[c] = 0; pos[c] = 0; pend[c] = 0; spike_frame[c] = -1;
    end
  end

  task automatic fire(input int c, input int k);
    pend[c] = k;
  endtask

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_timer <= '0;
      for (int c = 0; c < NCH; c++) adc_data[c] <= DW'(MIDSCALE);
    end else begin
      if (int'(adc_timer) == FRAME - 1) begin
        adc_timer <= '0;
        frame     <= frame + 1;
        for (int c = 0; c < NCH; c++) begin
          int v;
          if (pend[c] != 0) begin
            kind[c] = pend[c]; pend[c] = 0; pos[c] = 0; spike_frame[c] = frame + 1;
          end
          v = MIDSCALE + int'($urandom_range(0, 6)) - 3;
          if (kind[c] != 0) begin
            v = MIDSCALE + ((kind[c] == 1) ? good[pos[c]] : bad[pos[c]]);
            pos[c]++;
            if (pos[c] == 10) kind[c] = 0;
          end
          adc_data[c] <= DW'(v);
        end
      end else adc_timer <= adc_timer + 5'd1;
    end
  end

endmodule
