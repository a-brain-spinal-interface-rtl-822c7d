// counter_delay: per-recording-channel spike counter and PASS delay of the
// decision maker.
//
// It counts the spikes flagged by the discriminator (rising edges of sdo,
// sampled once per ADC frame on tick). The first spike opens a time bin of
// T_Bin (56 us steps, counted on bin_tick); if N spikes arrive before the bin
// expires the criteria are met, otherwise the count is dropped and the next
// spike opens a new bin. Once the criteria are met:
//   - adb (activity-dependent blanking) goes high at once,
//   - pass goes high T_D frames (28 us steps) after the last spike,
//   - pass stays high T_pass frames; pass and adb then fall together
// and the unit is idle again. Spikes are ignored while adb is high.
//
// This behaviour is the document's (counting N spikes within T_Bin, PASS
// after T_D, ADB from the last spike to PASS falling, programmable PASS
// duration). The state machine, the handling of T_D = 0 and T_pass = 0 as
// one frame, N = 0 as "channel disabled", and the precedence of a spike over
// bin expiry on the same tick are this design's choices. Outputs are
// registered; all transitions happen on tick.
module counter_delay
  import bsi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,      // one per ADC frame (28 us)
  input  logic       bin_tick,  // one per two frames (56 us), coincides with tick
  input  logic       sdo,
  input  cd_params_t p,
  output logic       pass,
  output logic       adb
);

  typedef enum logic [1:0] {S_IDLE, S_BIN, S_DELAY, S_PASS} state_e;

  state_e      state;
  logic        sdo_q, rise;
  logic [3:0]  cnt;
  logic [12:0] bin_cnt;
  logic [9:0]  dcnt;

  assign rise = sdo && !sdo_q;
  assign pass = (state == S_PASS);
  assign adb  = (state == S_DELAY) || (state == S_PASS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sdo_q   <= 1'b0;
      cnt     <= '0;
      bin_cnt <= '0;
      dcnt    <= '0;
    end else if (tick) begin
      sdo_q <= sdo;
      unique case (state)
        S_IDLE: if (rise && p.n != 4'd0) begin
          cnt     <= 4'd1;
          bin_cnt <= '0;
          dcnt    <= 10'd1;
          state   <= (p.n == 4'd1) ? S_DELAY : S_BIN;
        end
        S_BIN: begin
          if (rise && (cnt + 4'd1 >= p.n)) begin
            dcnt  <= 10'd1;
            state <= S_DELAY;
          end else if (bin_tick && (bin_cnt + 13'd1 >= p.t_bin)) begin
            state <= S_IDLE;
          end else begin
            if (rise)     cnt     <= cnt + 4'd1;
            if (bin_tick) bin_cnt <= bin_cnt + 13'd1;
          end
        end
        S_DELAY: begin
          if (dcnt >= p.t_d) begin
            dcnt  <= 10'd1;
            state <= S_PASS;
          end else dcnt <= dcnt + 10'd1;
        end
        S_PASS: begin
          if (dcnt >= p.t_pass) state <= S_IDLE;
          else                  dcnt  <= dcnt + 10'd1;
        end
      endcase
    end
  end

endmodule
