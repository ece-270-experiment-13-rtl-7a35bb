// tb_bus_mux: self-checking test of the bus multiplexers with random inputs:
// address bus from IR or PC, data bus from DIP or memory, and the memory
// write port taken from the editor in edit mode or from the processor
// (accumulator with three zero bits above it) in run mode.
module tb_bus_mux;
  logic edit_mode, ira, dsel_in, cpu_we, edit_we, mem_we;
  logic [3:0] pc, ir_addr, mem_data, dip_in, acc, edit_addr, abus, dbus, mem_waddr;
  logic [6:0] edit_wdata, mem_wdata;
  int checks = 0, failures = 0;

  bus_mux dut (.edit_mode(edit_mode), .ira(ira), .pc(pc), .ir_addr(ir_addr),
               .dsel_in(dsel_in), .mem_data(mem_data), .dip_in(dip_in), .cpu_we(cpu_we),
               .acc(acc), .edit_we(edit_we), .edit_addr(edit_addr), .edit_wdata(edit_wdata),
               .abus(abus), .dbus(dbus), .mem_we(mem_we), .mem_waddr(mem_waddr),
               .mem_wdata(mem_wdata));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ea, ed, ewa;
    logic [6:0] ewd;
    logic ewe;
    for (int i = 0; i < 3000; i++) begin
      {edit_mode, ira, dsel_in, cpu_we, edit_we} = 5'($urandom);
      pc = 4'($urandom); ir_addr = 4'($urandom); mem_data = 4'($urandom);
      dip_in = 4'($urandom); acc = 4'($urandom); edit_addr = 4'($urandom);
      edit_wdata = 7'($urandom);
      #1;
      ea  = ira ? ir_addr : pc;
      ed  = dsel_in ? dip_in : mem_data;
      ewe = edit_mode ? edit_we : cpu_we;
      ewa = edit_mode ? edit_addr : ea;
      ewd = edit_mode ? edit_wdata : {3'b000, acc};
      checks++;
      if (abus !== ea || dbus !== ed || mem_we !== ewe || mem_waddr !== ewa || mem_wdata !== ewd) begin
        failures++;
        if (failures < 10) $display("FAIL %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
