// instr_reg: the 7-bit instruction register (IR).
//
// On a rising clock edge with IRL = 1 (the fetch cycle) it captures the
// instruction word on the memory data bus; otherwise it holds it through the
// execute cycle. It presents the word split into its 3-bit opcode field
// (bits 6:4) and its 4-bit address field (bits 3:0). A synchronous reset
// clears it to 0 (HLT, address 0), which is this design's choice.
module instr_reg
  import psc716_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               irl,
  input  logic [INSTR_W-1:0] din,
  output opcode_e            opcode,
  output logic [ADDR_W-1:0]  addr
);
  logic [INSTR_W-1:0] ir;

  always_ff @(posedge clk) begin
    if (rst)      ir <= '0;
    else if (irl) ir <= din;
  end

  assign opcode = opcode_e'(ir[INSTR_W-1:ADDR_W]);
  assign addr   = ir[ADDR_W-1:0];
endmodule
