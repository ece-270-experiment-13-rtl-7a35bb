// bus_mux: the multiplexers that take the place of tri-state buses in the
// PSC 716.
//
//   address bus  IR address field when IRA = 1 (execute cycle of a memory
//                instruction), otherwise the PC (fetch cycle)
//   data bus     DIP[3:0] when the INA input port is selected, otherwise the
//                low four bits of the memory word at the address bus
//   memory write in edit mode the memory editor's address, DIP[6:0] word and
//                write strobe; in run mode the address bus, the accumulator
//                with three zero bits above it, and the STA write strobe
// Purely combinational. Routing by multiplexers and the zero upper bits of a
// stored accumulator follow the machine's description; the split of the
// routing into these three multiplexers is this design's choice.
module bus_mux
  import psc716_pkg::*;
(
  input  logic               edit_mode,
  // processor side
  input  logic               ira,
  input  logic [ADDR_W-1:0]  pc,
  input  logic [ADDR_W-1:0]  ir_addr,
  input  logic               dsel_in,
  input  logic [DATA_W-1:0]  mem_data,   // low bits of the addressed word
  input  logic [DATA_W-1:0]  dip_in,
  input  logic               cpu_we,
  input  logic [DATA_W-1:0]  acc,
  // memory editor side
  input  logic               edit_we,
  input  logic [ADDR_W-1:0]  edit_addr,
  input  logic [INSTR_W-1:0] edit_wdata,
  // buses
  output logic [ADDR_W-1:0]  abus,
  output logic [DATA_W-1:0]  dbus,
  output logic               mem_we,
  output logic [ADDR_W-1:0]  mem_waddr,
  output logic [INSTR_W-1:0] mem_wdata
);
  always_comb begin
    abus = ira ? ir_addr : pc;
    dbus = dsel_in ? dip_in : mem_data;
    if (edit_mode) begin
      mem_we    = edit_we;
      mem_waddr = edit_addr;
      mem_wdata = edit_wdata;
    end else begin
      mem_we    = cpu_we;
      mem_waddr = abus;
      mem_wdata = {{(INSTR_W-DATA_W){1'b0}}, acc};
    end
  end
endmodule
