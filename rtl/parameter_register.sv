// parameter_register: the chip's programming register (874 bits by default).
//
// Loaded serially, most significant bit first: while shift_en is high one bit
// of din enters the shift register per system clock, and the previous MSB
// appears on dout (so several registers can be chained). A pulse on load copies
// the whole shift register into the parameter outputs q in one cycle, so the
// DSP never sees a half-loaded word. Reset clears both. The document gives the
// register and its size; the serial interface and the shadow copy are this
// design's choices.
module parameter_register #(
  parameter int WIDTH = 874
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             din,
  input  logic             load,
  output logic             dout,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      q    <= '0;
    end else begin
      if (shift_en) sreg <= {sreg[WIDTH-2:0], din};
      if (load)     q    <= sreg;
    end
  end

  assign dout = sreg[WIDTH-1];

endmodule
