// tb_cla4: exhaustive self-checking test of the 4-bit adder/subtractor.
// All 16 x 16 operand pairs are applied for both add and subtract. Expected
// sum, carry/borrow, negative, zero and overflow are computed with integer
// arithmetic in the testbench: CF is the carry out of an add or the borrow
// of a subtract, VF is set when the signed result leaves -8..7.
module tb_cla4;
  logic [3:0] x, y, s;
  logic       sub, cf, nf, zf, vf;
  int checks = 0, failures = 0;

  cla4 dut (.x(x), .y(y), .sub(sub), .s(s), .cf(cf), .nf(nf), .zf(zf), .vf(vf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ux, uy, sx, sy, ur, sr;
    logic [3:0] er;
    logic ecf, evf;
    for (int op = 0; op < 2; op++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          x = 4'(i); y = 4'(j); sub = op[0];
          #1;
          ux = i; uy = j;
          sx = (i > 7) ? i - 16 : i;
          sy = (j > 7) ? j - 16 : j;
          if (op == 0) begin
            ur = ux + uy; sr = sx + sy; ecf = (ur > 15);
          end else begin
            ur = ux - uy; sr = sx - sy; ecf = (ux < uy);
          end
          er  = 4'(ur);
          evf = (sr > 7) || (sr < -8);
          checks++;
          if (s !== er || cf !== ecf || nf !== er[3] || zf !== (er == 0) || vf !== evf) begin
            failures++;
            if (failures < 10)
              $display("FAIL %s %0d,%0d: s=%h cf%b nf%b zf%b vf%b exp s=%h cf%b vf%b",
                       op ? "sub" : "add", i, j, s, cf, nf, zf, vf, er, ecf, evf);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
