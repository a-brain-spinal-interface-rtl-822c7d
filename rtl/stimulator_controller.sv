// stimulator_controller: timing of the ISMS current-pulse trains.
//
// A rising edge of TriggerX starts a train on stimulating channel X (edges
// during a running train are ignored). The train has n_pulses pulses (1..31)
// at a fixed rate of 1 MHz / 8192 = 122 Hz. Each pulse, counted from the start
// of its 8192-cycle period, is
//   biphasic:   anodic for t_anodic, cathodic for t_cathodic,
//               then electrode discharge for t_discharge
//   monophasic: anodic for t_anodic, then passive discharge for t_discharge
// (durations in system clocks). StimX is high from the trigger until the
// last pulse's discharge phase ends; the blanking unit uses it.
// The anodic / cathodic / discharge phase outputs drive the stimulating
// back-end (through its level shifter); the current amplitude is set there
// by the DAC code and does not pass through this block.
// The document gives the phase signals, the 5-bit pulse count, the 122 Hz
// train rate and the two waveforms; phase order, phase-duration widths and
// n_pulses = 0 meaning "no train" are this design's choices. Outputs are
// registered-state decodes, one set per channel.
module stimulator_controller
  import bsi_pkg::*;
#(
  parameter int PERIOD = 8192  // system clocks per pulse (122 Hz at 1 MHz)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] trigger,
  input  stim_params_t   p,
  output logic [NCH-1:0] anodic,
  output logic [NCH-1:0] cathodic,
  output logic [NCH-1:0] discharge,
  output logic [NCH-1:0] stim
);

  localparam int PW = $clog2(PERIOD);

  logic [NCH-1:0] trig_q;
  logic [NCH-1:0] active;
  logic [PW-1:0]  pcnt  [NCH];
  logic [4:0]     pulse [NCH];
  logic [PW-1:0]  end_an, end_ca, end_pulse;

  always_comb begin
    end_an    = PW'(p.t_anodic);
    end_ca    = p.biphasic ? end_an + PW'(p.t_cathodic) : end_an;
    end_pulse = end_ca + PW'(p.t_discharge);
    for (int c = 0; c < NCH; c++) begin
      anodic[c]    = active[c] && (pcnt[c] < end_an);
      cathodic[c]  = active[c] && (pcnt[c] >= end_an) && (pcnt[c] < end_ca);
      discharge[c] = active[c] && (pcnt[c] >= end_ca) && (pcnt[c] < end_pulse);
    end
  end

  assign stim = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q <= '0;
      active <= '0;
      for (int c = 0; c < NCH; c++) begin
        pcnt[c]  <= '0;
        pulse[c] <= '0;
      end
    end else begin
      trig_q <= trigger;
      for (int c = 0; c < NCH; c++) begin
        if (!active[c]) begin
          if (trigger[c] && !trig_q[c] && p.n_pulses != 5'd0) begin
            active[c] <= 1'b1;
            pcnt[c]   <= '0;
            pulse[c]  <= 5'd1;
          end
        end else if (pulse[c] >= p.n_pulses && pcnt[c] + PW'(1) >= end_pulse) begin
          active[c] <= 1'b0;
        end else begin
          pcnt[c] <= pcnt[c] + PW'(1);  // wraps every PERIOD cycles
          if (pcnt[c] == PW'(PERIOD - 1)) pulse[c] <= pulse[c] + 5'd1;
        end
      end
    end
  end

endmodule
