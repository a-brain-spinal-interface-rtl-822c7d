// digital_hpf: first-order IIR highpass filter shared by the four recording
// channels of a module.
//
//   H(z) = (1 - z^-1) / (1 - (1-K) z^-1),  K = 1/16 (k16 = 1) or 1/8 (k16 = 0)
//
// Structure (as the document draws it): an accumulator w[n] = x[n] + (1-K)w[n-1]
// kept to 14 bits, one z^-1 register per channel, and an output stage
// y[n] = w[n] - w[n-1] + 512 followed by overflow/underflow saturation to the
// 10-bit range. (1-K)w is w minus w shifted right by 4 or 3, so the filter
// needs only shifts, additions and subtractions. At the 35.7 kSa/s channel rate
// K = 1/16 gives a cutoff near 366 Hz and K = 1/8 near 756 Hz.
//
// Interface: when en is high, sample x of channel ch is filtered and that
// channel's state updated; y and y_ch are registered and valid in the next
// cycle (y_valid). x is the unsigned 10-bit ADC code; y is unsigned around the
// mid-scale 512. The truncation of (1-K)w towards zero and clearing the state
// on reset are this design's choices.
module digital_hpf
  import bsi_pkg::*;
#(
  parameter int AW = 14  // accumulator width (document: 14b)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [1:0]    ch,
  input  logic [DW-1:0] x,
  input  logic          k16,
  output logic [DW-1:0] y,
  output logic [1:0]    y_ch,
  output logic          y_valid
);

  logic [AW-1:0] w_mem [NCH];
  logic [AW-1:0] w_prev, w_fb, w_new;
  logic signed [AW+1:0] diff;
  logic [DW-1:0] y_sat;

  always_comb begin
    w_prev = w_mem[ch];
    w_fb   = k16 ? (w_prev - (w_prev >> 4)) : (w_prev - (w_prev >> 3));
    w_new  = w_fb + AW'(x);
    diff   = $signed({2'b00, w_new}) - $signed({2'b00, w_prev}) + (AW+2)'(MIDSCALE);
    if (diff < 0)                       y_sat = '0;
    else if (diff > (AW+2)'(2**DW - 1)) y_sat = '1;
    else                                y_sat = diff[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) w_mem[i] <= '0;
      y       <= DW'(MIDSCALE);
      y_ch    <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        w_mem[ch] <= w_new;
        y         <= y_sat;
        y_ch      <= ch;
      end
    end
  end

endmodule
