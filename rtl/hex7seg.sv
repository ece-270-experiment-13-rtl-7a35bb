// hex7seg: hexadecimal digit to seven-segment pattern, for the DIS1-DIS4
// displays.
//
// Output bit order is {g, f, e, d, c, b, a} with the usual layout (a at the
// top, then clockwise, g in the middle). Digits A-F show as A, b, C, d, E, F.
// Segments are active high unless ACTIVE_LOW = 1. Purely combinational. That
// the displays show hex digits is the machine's; the segment order and
// polarity are this design's choices.
module hex7seg #(
  parameter bit ACTIVE_LOW = 1'b0
) (
  input  logic [3:0] hex,
  output logic [6:0] seg
);
  logic [6:0] on;

  always_comb begin
    unique case (hex)
      4'h0: on = 7'b0111111;
      4'h1: on = 7'b0000110;
      4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111;
      4'h4: on = 7'b1100110;
      4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101;
      4'h7: on = 7'b0000111;
      4'h8: on = 7'b1111111;
      4'h9: on = 7'b1101111;
      4'hA: on = 7'b1110111;
      4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001;
      4'hD: on = 7'b1011110;
      4'hE: on = 7'b1111001;
      default: on = 7'b1110001;  // F
    endcase
    seg = ACTIVE_LOW ? ~on : on;
  end
endmodule
