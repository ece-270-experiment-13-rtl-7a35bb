// tb_alu: self-checking test of the ALU with its accumulator and flags.
// Random sequences of ADD, SUB, LDA, AND and idle (ALE = 0) cycles are
// applied; a reference model kept in the testbench (plain integer
// arithmetic) predicts A and CF/NF/ZF/VF after every clock. LDA and AND must
// leave CF and VF unchanged; ALE = 0 must change nothing. Every result is
// visible one clock after the operation.
module tb_alu;
  import psc716_pkg::*;
  logic clk = 0, rst, ale;
  alu_fn_e fn;
  logic [3:0] dbus, a;
  flags_t flags;
  int checks = 0, failures = 0;
  logic [3:0] ma;
  flags_t mf;
  int n_cf = 0, n_vf = 0, n_keep = 0;

  alu dut (.clk(clk), .rst(rst), .ale(ale), .fn(fn), .dbus(dbus), .a(a), .flags(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step(input logic en, input alu_fn_e f, input logic [3:0] d);
    int sa, sd, r, sr;
    if (!en) return;
    sa = (ma > 7) ? int'(ma) - 16 : int'(ma);
    sd = (d > 7) ? int'(d) - 16 : int'(d);
    case (f)
      ALU_ADD: begin
        r = int'(ma) + int'(d); sr = sa + sd;
        mf.cf = (r > 15); mf.vf = (sr > 7 || sr < -8); ma = 4'(r);
      end
      ALU_SUB: begin
        r = int'(ma) - int'(d); sr = sa - sd;
        mf.cf = (int'(ma) < int'(d)); mf.vf = (sr > 7 || sr < -8); ma = 4'(r);
      end
      ALU_LDA: ma = d;
      ALU_AND: ma = ma & d;
    endcase
    mf.nf = ma[3];
    mf.zf = (ma == 0);
  endtask

  initial begin
    rst = 1; ale = 0; fn = ALU_ADD; dbus = 0;
    @(posedge clk); #1;
    rst = 0; ma = 0; mf = '0;
    checks++;
    if (a !== 0 || flags !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 4000; i++) begin
      ale  = ($urandom_range(0, 5) != 0);
      fn   = alu_fn_e'($urandom_range(0, 3));
      dbus = 4'($urandom);
      @(posedge clk); #1;
      if (ale && (fn == ALU_LDA || fn == ALU_AND) && (mf.cf || mf.vf)) n_keep++;
      model_step(ale, fn, dbus);
      if (mf.cf) n_cf++;
      if (mf.vf) n_vf++;
      checks++;
      if (a !== ma || flags !== mf) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: A=%h flags=%b exp A=%h flags=%b", i, a, flags, ma, mf);
      end
    end
    // these cases must have been exercised
    checks++;
    if (n_cf == 0 || n_vf == 0 || n_keep == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
