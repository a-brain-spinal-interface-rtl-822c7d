// pattern_generator: sequential-mode trigger sequencer of the decision maker.
//
// A rising edge of CCO4 (the output of combination code 4, reused in the
// sequential modes as the triggering criterion) arms the generator and the
// sequence starts at the next tick56, so that all intervals are whole 56 us
// steps (Trigger 1 thus follows CCO4 by at most 56 us). Edges that arrive
// while a sequence is armed or running are ignored. With the elapsed time e
// counted in 56 us steps (tick56) from the start:
//   sequential:         Trigger k fires at e = (k-1) * T_D_Stim, k = 1..4
//   paired sequential:  Trigger 1,2 at e = 0, Trigger 3,4 at e = 3 * T_D_Stim
// and T_D_Stim = 0 fires all four together. Each trigger is high while e has
// its value, i.e. for one 56 us step. seq_trig is high from the CCO4 edge
// until the tick56 that ends Trigger 4's pulse. The generator only runs while
// enable (PG_Enable) is high.
// The firing times and the 3 x T_D_Stim pair spacing are the document's;
// trigger pulse width and the seq_trig end point are this design's choices.
module pattern_generator
  import bsi_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enable,
  input  logic           paired,
  input  logic           tick56,
  input  logic           cco4,
  input  logic [13:0]    t_dstim,
  output logic [NCH-1:0] pgo,
  output logic           seq_trig
);

  logic        active, armed, cco4_q;
  logic [15:0] elapsed;
  logic [15:0] d1, d3;
  logic [15:0] when_fires [NCH];

  always_comb begin
    d1 = 16'(t_dstim);
    d3 = 16'(t_dstim) * 16'd3;
    for (int k = 0; k < NCH; k++) begin
      if (paired) when_fires[k] = (k < 2) ? 16'd0 : d3;
      else        when_fires[k] = d1 * 16'(k);
      pgo[k] = active && (elapsed == when_fires[k]);
    end
  end

  assign seq_trig = active || armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      armed   <= 1'b0;
      cco4_q  <= 1'b0;
      elapsed <= '0;
    end else begin
      cco4_q <= cco4;
      if (!enable) begin
        active <= 1'b0;
        armed  <= 1'b0;
      end else if (armed) begin
        if (tick56) begin
          armed   <= 1'b0;
          active  <= 1'b1;
          elapsed <= '0;
        end
      end else if (!active) begin
        if (cco4 && !cco4_q) armed <= 1'b1;
      end else if (tick56) begin
        if (elapsed >= d3) active  <= 1'b0;
        else               elapsed <= elapsed + 16'd1;
      end
    end
  end

endmodule
