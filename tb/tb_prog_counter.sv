// tb_prog_counter: self-checking test of the 4-bit program counter: reset to
// 0, increment by one per clock while PCC = 1, hold while PCC = 0, wrap from
// 15 to 0, and reset in the middle of a count.
module tb_prog_counter;
  logic clk = 0, rst, pcc;
  logic [3:0] pc;
  int checks = 0, failures = 0;
  int exp_pc;

  prog_counter dut (.clk(clk), .rst(rst), .pcc(pcc), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pcc = 1;
    @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0; exp_pc = 0;
    for (int i = 0; i < 500; i++) begin
      pcc = $urandom_range(0, 1);
      rst = ($urandom_range(0, 40) == 0);
      @(posedge clk); #1;
      if (rst) exp_pc = 0;
      else if (pcc) exp_pc = (exp_pc + 1) % 16;
      checks++;
      if (pc !== 4'(exp_pc)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: pc=%0d exp %0d", i, pc, exp_pc);
      end
    end
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
