// psc716: the Personal Simple Computer PSC 716, top level.
//
// A 4-bit accumulator machine with 7-bit instructions (3-bit opcode, 4-bit
// address) and 16 words of flip-flop memory. Eight instructions: HLT, LDA,
// ADD, SUB, AND, STA, INA (A <- DIP[3:0]) and OUA (DIS4 <- A). Each
// instruction takes two clock cycles, a fetch and an execute, sequenced by
// the idms block. Multiplexers (bus_mux) route the address and data buses in
// place of tri-state buses.
//
// Two modes, selected by DIP[7]:
//   edit (DIP[7] = 1)  the processor is held in reset (PC = 0, A, flags and
//                      output cleared). S1BC steps the edit address shown on
//                      DIS3; S2BC writes DIP[6:0] into that location, whose
//                      contents show on DIS2:DIS1.
//   run  (DIP[7] = 0)  the processor runs the program from address 0 until
//                      HLT. DIP[3:0] is the input port, DIS4 the output
//                      port. DIS3 and DIS2:DIS1 keep showing the edit
//                      address and its contents, so a result can be watched.
// Outputs: the four display digits as hex values (dis_hex[0] = DIS1 ...
// dis_hex[3] = DIS4) and as segment patterns, the condition codes CF, NF,
// ZF, VF and a halted indicator. The display and LED pin mapping of a
// particular board is left to the board wrapper.
// All registers use the one clock CLK and a synchronous reset RST; the
// pushbutton inputs are expected debounced and synchronous to CLK.
module psc716
  import psc716_pkg::*;
#(
  parameter bit SEG_ACTIVE_LOW = 1'b0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [7:0]      dip,
  input  logic            s1bc,      // right pushbutton: next edit address
  input  logic            s2bc,      // left pushbutton: write DIP[6:0]
  output logic [3:0]      dis_hex [4],
  output logic [6:0]      dis_seg [4],
  output flags_t          flags,     // CF, NF, ZF, VF
  output logic            halted
);
  logic               edit_mode, cpu_rst;
  ctrl_t              ctrl;
  opcode_e            opcode;
  logic [ADDR_W-1:0]  pc, ir_addr, abus, edit_addr, mem_waddr;
  logic [DATA_W-1:0]  dbus, acc, outp;
  logic [INSTR_W-1:0] mem_rdata, mem_wdata, edit_rdata, edit_wdata;
  logic               mem_we, edit_we;
  logic [3:0]         dis3, dis2, dis1;

  assign edit_mode = dip[7];
  assign cpu_rst   = rst | edit_mode;

  idms u_idms (
    .clk   (clk),
    .rst   (cpu_rst),
    .opcode(opcode),
    .ctrl  (ctrl),
    .halted(halted)
  );

  prog_counter #(.W(ADDR_W)) u_pc (
    .clk(clk),
    .rst(cpu_rst),
    .pcc(ctrl.pcc),
    .pc (pc)
  );

  instr_reg u_ir (
    .clk   (clk),
    .rst   (cpu_rst),
    .irl   (ctrl.irl),
    .din   (mem_rdata),
    .opcode(opcode),
    .addr  (ir_addr)
  );

  alu u_alu (
    .clk  (clk),
    .rst  (cpu_rst),
    .ale  (ctrl.ale),
    .fn   (ctrl.alu_fn),
    .dbus (dbus),
    .a    (acc),
    .flags(flags)
  );

  out_port #(.W(DATA_W)) u_out (
    .clk(clk),
    .rst(cpu_rst),
    .ld (ctrl.orl),
    .d  (acc),
    .q  (outp)
  );

  bus_mux u_bus (
    .edit_mode (edit_mode),
    .ira       (ctrl.ira),
    .pc        (pc),
    .ir_addr   (ir_addr),
    .dsel_in   (ctrl.dsel_in),
    .mem_data  (mem_rdata[DATA_W-1:0]),
    .dip_in    (dip[3:0]),
    .cpu_we    (ctrl.mwe),
    .acc       (acc),
    .edit_we   (edit_we),
    .edit_addr (edit_addr),
    .edit_wdata(edit_wdata),
    .abus      (abus),
    .dbus      (dbus),
    .mem_we    (mem_we),
    .mem_waddr (mem_waddr),
    .mem_wdata (mem_wdata)
  );

  sram16x7 #(.DEPTH(MEM_DEPTH), .WIDTH(INSTR_W)) u_mem (
    .clk    (clk),
    .we     (mem_we),
    .waddr  (mem_waddr),
    .wdata  (mem_wdata),
    .raddr_a(abus),
    .rdata_a(mem_rdata),
    .raddr_b(edit_addr),
    .rdata_b(edit_rdata)
  );

  mem_editor u_edit (
    .clk      (clk),
    .rst      (rst),
    .edit_mode(edit_mode),
    .s1bc     (s1bc),
    .s2bc     (s2bc),
    .dip_word (dip[INSTR_W-1:0]),
    .mem_rdata(edit_rdata),
    .edit_addr(edit_addr),
    .we       (edit_we),
    .wdata    (edit_wdata),
    .dis3     (dis3),
    .dis2     (dis2),
    .dis1     (dis1)
  );

  assign dis_hex[0] = dis1;
  assign dis_hex[1] = dis2;
  assign dis_hex[2] = dis3;
  assign dis_hex[3] = outp;

  // The editor and the processor never write memory in the same cycle.
  a_one_writer: assert property (@(posedge clk) disable iff (rst)
    !(edit_we && ctrl.mwe));

  for (genvar i = 0; i < 4; i++) begin : g_disp
    hex7seg #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_seg (
      .hex(dis_hex[i]),
      .seg(dis_seg[i])
    );
  end
endmodule
