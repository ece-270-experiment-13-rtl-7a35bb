// tb_instr_reg: self-checking test of the instruction register: it captures
// the 7-bit word when IRL = 1, holds it when IRL = 0 whatever the input does,
// splits it into opcode (bits 6:4) and address (bits 3:0), and clears on
// reset.
module tb_instr_reg;
  import psc716_pkg::*;
  logic clk = 0, rst, irl;
  logic [6:0] din, held;
  opcode_e opcode;
  logic [3:0] addr;
  int checks = 0, failures = 0;

  instr_reg dut (.clk(clk), .rst(rst), .irl(irl), .din(din), .opcode(opcode), .addr(addr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; irl = 1; din = 7'h7F;
    @(posedge clk); #1;
    checks++; if (opcode !== OP_HLT || addr !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0; held = 0;
    for (int i = 0; i < 500; i++) begin
      irl = $urandom_range(0, 1);
      din = 7'($urandom);
      @(posedge clk); #1;
      if (irl) held = din;
      checks++;
      if (opcode !== opcode_e'(held[6:4]) || addr !== held[3:0]) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: op=%b addr=%h exp %b %h", i, opcode, addr, held[6:4], held[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
