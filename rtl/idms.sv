// idms: instruction decoder and micro-sequencer of the PSC 716.
//
// A two-phase sequencer alternates a fetch cycle and an execute cycle, so
// every instruction takes two clock cycles:
//   FETCH    address bus <- PC, IR <- memory, PC <- PC + 1
//   EXECUTE  the opcode held in IR is decoded into one cycle of control:
//     LDA/ADD/SUB/AND  address bus <- IR address, ALE with {ALX,ALY}
//     STA              address bus <- IR address, memory write of A
//     INA              data bus <- DIP[3:0], ALE with the LDA function
//     OUA              output register (DIS4) load from A
//     HLT              enter HALT
//   HALT     every control signal inactive; all state is kept until reset.
// Reset (also held while the machine is in memory edit mode) puts the
// sequencer in FETCH. The control outputs depend only on the state and the
// opcode (a Moore decoder), so they are stable for the whole cycle.
// The instruction set and the fetch/execute organisation follow the
// machine's description; the exact control encoding, the HALT state and the
// routing of INA through the ALU's load function are this design's choices.
module idms
  import psc716_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_e opcode,   // from IR
  output ctrl_t   ctrl,
  output logic    halted    // 1 once HLT has executed
);
  typedef enum logic [1:0] {S_FETCH, S_EXEC, S_HALT} state_e;
  state_e state, nstate;

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= nstate;
  end

  always_comb begin
    ctrl   = '0;
    nstate = state;
    unique case (state)
      S_FETCH: begin
        ctrl.irl = 1'b1;
        ctrl.pcc = 1'b1;
        nstate   = S_EXEC;
      end
      S_EXEC: begin
        nstate = S_FETCH;
        unique case (opcode)
          OP_HLT: nstate = S_HALT;
          OP_LDA: begin ctrl.ira = 1'b1; ctrl.ale = 1'b1; ctrl.alu_fn = ALU_LDA; end
          OP_ADD: begin ctrl.ira = 1'b1; ctrl.ale = 1'b1; ctrl.alu_fn = ALU_ADD; end
          OP_SUB: begin ctrl.ira = 1'b1; ctrl.ale = 1'b1; ctrl.alu_fn = ALU_SUB; end
          OP_AND: begin ctrl.ira = 1'b1; ctrl.ale = 1'b1; ctrl.alu_fn = ALU_AND; end
          OP_STA: begin ctrl.ira = 1'b1; ctrl.mwe = 1'b1; end
          OP_INA: begin ctrl.dsel_in = 1'b1; ctrl.ale = 1'b1; ctrl.alu_fn = ALU_LDA; end
          OP_OUA: ctrl.orl = 1'b1;
          default: ;
        endcase
      end
      S_HALT:  nstate = S_HALT;
      default: nstate = S_FETCH;
    endcase
  end

  assign halted = (state == S_HALT);

  // Sequencing rules: a fetch is always followed by an execute (or halt), a
  // memory write always uses the IR address, at most one destination is
  // written per cycle, and a halted machine drives no control line.
  a_fetch_then_exec: assert property (@(posedge clk) disable iff (rst)
    ctrl.irl |=> !ctrl.irl);
  a_write_uses_ir_addr: assert property (@(posedge clk) disable iff (rst)
    ctrl.mwe |-> ctrl.ira);
  a_one_destination: assert property (@(posedge clk) disable iff (rst)
    (32'(ctrl.mwe) + 32'(ctrl.ale) + 32'(ctrl.orl) + 32'(ctrl.irl)) <= 1);
  a_halt_quiet: assert property (@(posedge clk) disable iff (rst)
    halted |-> (ctrl == '0));
endmodule
