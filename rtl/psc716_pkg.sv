// psc716_pkg: types and constants shared by the PSC 716 modules.
//
// The PSC 716 is a 4-bit accumulator computer with 7-bit instruction words
// and 16 words of memory. An instruction word is a 3-bit opcode above a
// 4-bit address. The opcode encoding, the widths and the ALU select code
// (ALX, ALY) follow the machine's instruction set and ALU function tables.
// The control bundle and its field names are this design's own choice.
package psc716_pkg;

  localparam int unsigned DATA_W  = 4;   // ALU and accumulator width
  localparam int unsigned ADDR_W  = 4;   // memory address width
  localparam int unsigned OPC_W   = 3;   // opcode field width
  localparam int unsigned INSTR_W = OPC_W + ADDR_W;  // 7-bit instruction
  localparam int unsigned MEM_DEPTH = 1 << ADDR_W;   // 16 locations

  // Instruction set, one opcode per mnemonic.
  typedef enum logic [OPC_W-1:0] {
    OP_HLT = 3'b000,  // halt, keep all state
    OP_LDA = 3'b001,  // A <- (addr)
    OP_ADD = 3'b010,  // A <- A + (addr)
    OP_SUB = 3'b011,  // A <- A - (addr)
    OP_AND = 3'b100,  // A <- A & (addr)
    OP_STA = 3'b101,  // (addr) <- 000 & A
    OP_INA = 3'b110,  // A <- DIP[3:0]
    OP_OUA = 3'b111   // DIS4 <- A
  } opcode_e;

  // ALU function select {ALX, ALY}, used when ALE = 1.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_LDA = 2'b10,
    ALU_AND = 2'b11
  } alu_fn_e;

  // Condition codes held beside the accumulator.
  typedef struct packed {
    logic cf;  // carry (add) / borrow (subtract)
    logic nf;  // negative: sign bit of the result
    logic zf;  // zero result
    logic vf;  // two's complement overflow
  } flags_t;

  // Control signals produced by the instruction decoder / micro-sequencer.
  typedef struct packed {
    logic    pcc;      // PC count (increment)
    logic    irl;      // IR load from the data bus
    logic    ira;      // address bus from IR address field (else from PC)
    logic    mwe;      // memory write of the accumulator
    logic    ale;      // ALU enable (update A and flags)
    alu_fn_e alu_fn;   // {ALX, ALY}
    logic    dsel_in;  // data bus from DIP[3:0] input port (else memory)
    logic    orl;      // output register (DIS4) load
  } ctrl_t;

endpackage
