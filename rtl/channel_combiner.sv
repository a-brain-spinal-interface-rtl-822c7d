// channel_combiner: individual-mode trigger logic of the decision maker.
//
// Each stimulating channel x has a 16-bit combination code that defines its
// trigger CCO_x as any logic function of the four PASS signals: the code is
// the function's truth table, indexed by {PASS4, PASS3, PASS2, PASS1}. For
// example 16'hAAAA is "PASS1", 16'h8888 is "PASS1 AND PASS2" and 16'hFFFE is
// "any PASS". The document gives the 16-bit code per channel and that it is a
// logic combination of the PASS signals; reading the code as a truth table
// (the only 16-bit encoding of every 4-input function) is this design's.
// Purely combinational.
module channel_combiner
  import bsi_pkg::*;
(
  input  logic [NCH-1:0]       pass,
  input  logic [NCH-1:0][15:0] code,
  output logic [NCH-1:0]       cco
);

  always_comb begin
    for (int x = 0; x < NCH; x++) cco[x] = code[x][pass];
  end

endmodule
