// tb_idms: self-checking test of the instruction decoder / micro-sequencer.
// The testbench plays the instruction register: after each fetch cycle it
// presents a random opcode. It checks that fetch and execute cycles
// alternate (two clocks per instruction), that the fetch cycle asserts only
// IRL and PCC, that each opcode's execute cycle asserts exactly the control
// lines given by an independent table, and that HLT stops the sequencer
// with every control line inactive until reset.
module tb_idms;
  import psc716_pkg::*;
  logic clk = 0, rst;
  opcode_e opcode;
  ctrl_t ctrl, exp;
  logic halted;
  int checks = 0, failures = 0;
  int seen [8];

  idms dut (.clk(clk), .rst(rst), .opcode(opcode), .ctrl(ctrl), .halted(halted));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected execute-cycle controls; columns pcc irl ira mwe ale fn dsel orl
  function automatic ctrl_t exec_ctrl(opcode_e op);
    ctrl_t c;
    c = '0;
    case (op)
      OP_LDA: c = '{pcc:0, irl:0, ira:1, mwe:0, ale:1, alu_fn:ALU_LDA, dsel_in:0, orl:0};
      OP_ADD: c = '{pcc:0, irl:0, ira:1, mwe:0, ale:1, alu_fn:ALU_ADD, dsel_in:0, orl:0};
      OP_SUB: c = '{pcc:0, irl:0, ira:1, mwe:0, ale:1, alu_fn:ALU_SUB, dsel_in:0, orl:0};
      OP_AND: c = '{pcc:0, irl:0, ira:1, mwe:0, ale:1, alu_fn:ALU_AND, dsel_in:0, orl:0};
      OP_STA: c = '{pcc:0, irl:0, ira:1, mwe:1, ale:0, alu_fn:ALU_ADD, dsel_in:0, orl:0};
      OP_INA: c = '{pcc:0, irl:0, ira:0, mwe:0, ale:1, alu_fn:ALU_LDA, dsel_in:1, orl:0};
      OP_OUA: c = '{pcc:0, irl:0, ira:0, mwe:0, ale:0, alu_fn:ALU_ADD, dsel_in:0, orl:1};
      default: c = '0;
    endcase
    return c;
  endfunction

  task automatic check(input string what, input ctrl_t e, input logic eh);
    checks++;
    if (ctrl !== e || halted !== eh) begin
      failures++;
      if (failures < 10) $display("FAIL %s: ctrl=%b halted=%b exp %b %b", what, ctrl, halted, e, eh);
    end
  endtask

  initial begin
    ctrl_t fetch_c;
    fetch_c = '0; fetch_c.irl = 1; fetch_c.pcc = 1;
    for (int run = 0; run < 40; run++) begin
      rst = 1; opcode = OP_HLT;
      @(posedge clk); #1;
      rst = 0;
      // a run of random non-halt instructions, then HLT
      for (int k = 0; k < 30; k++) begin
        opcode_e op;
        op = (k == 29) ? OP_HLT : opcode_e'($urandom_range(1, 7));
        opcode = opcode_e'($urandom);  // IR not yet loaded: must not matter
        #1 check("fetch", fetch_c, 0);
        @(posedge clk); #1;
        opcode = op;  // IR loaded at the fetch edge
        #1 check(op.name(), exec_ctrl(op), 0);
        seen[op]++;
        @(posedge clk); #1;
      end
      // halted: nothing moves for a while
      for (int k = 0; k < 10; k++) begin
        opcode = opcode_e'($urandom);
        #1 check("halt", '0, 1);
        @(posedge clk); #1;
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL opcode %0d never executed", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
