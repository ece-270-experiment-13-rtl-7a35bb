// tb_hex7seg: self-checking test of the hex to seven-segment decoder. The
// expected pattern is built segment by segment from the list of digits that
// light each segment (a: 0 2 3 5 6 7 8 9 A C E F, and so on), for both
// polarities.
module tb_hex7seg;
  logic [3:0] hex;
  logic [6:0] seg_h, seg_l;
  int checks = 0, failures = 0;
  // one 16-bit mask per segment a..g; bit n set when digit n lights it
  localparam logic [15:0] LIT [7] = '{
    16'b1101_0111_1110_1101,  // a: 0 2 3 5 6 7 8 9 A C E F
    16'b0010_0111_1001_1111,  // b: 0 1 2 3 4 7 8 9 A d
    16'b0010_1111_1111_1011,  // c: 0 1 3 4 5 6 7 8 9 A b d
    16'b0111_1011_0110_1101,  // d: 0 2 3 5 6 8 9 b C d E
    16'b1111_1101_0100_0101,  // e: 0 2 6 8 A b C d E F
    16'b1101_1111_0111_0001,  // f: 0 4 5 6 8 9 A b C E F
    16'b1110_1111_0111_1100   // g: 2 3 4 5 6 8 9 A b d E F
  };

  hex7seg #(.ACTIVE_LOW(1'b0)) dut_h (.hex(hex), .seg(seg_h));
  hex7seg #(.ACTIVE_LOW(1'b1)) dut_l (.hex(hex), .seg(seg_l));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] e;
    for (int d = 0; d < 16; d++) begin
      hex = 4'(d);
      #1;
      for (int s = 0; s < 7; s++) e[s] = LIT[s][d];
      checks++;
      if (seg_h !== e || seg_l !== ~e) begin
        failures++;
        $display("FAIL digit %h: %b/%b exp %b", d, seg_h, seg_l, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
