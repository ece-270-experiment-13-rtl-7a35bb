// tb_mem_editor: self-checking test of the memory editor. Random button
// levels are applied in edit and run mode. The testbench predicts the edit
// address (one step per S1BC press, that is per rising edge of the button
// level, wrapping at F) and the write strobe (one cycle per S2BC press, and
// only in edit mode, carrying DIP[6:0]), and checks the DIS3/DIS2/DIS1
// digits against the memory word it supplies.
module tb_mem_editor;
  logic clk = 0, rst, edit_mode, s1, s2;
  logic [6:0] dip, rdata, wdata;
  logic [3:0] addr, dis3, dis2, dis1;
  logic we;
  int checks = 0, failures = 0;
  int n_write = 0, n_step = 0, n_wrap = 0, n_runblock = 0;
  logic s1_prev, s2_prev;
  int exp_addr;

  mem_editor dut (.clk(clk), .rst(rst), .edit_mode(edit_mode), .s1bc(s1), .s2bc(s2),
                  .dip_word(dip), .mem_rdata(rdata), .edit_addr(addr), .we(we),
                  .wdata(wdata), .dis3(dis3), .dis2(dis2), .dis1(dis1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; s1 = 0; s2 = 0; edit_mode = 1; dip = 0; rdata = 0;
    @(posedge clk); #1;
    rst = 0; exp_addr = 0; s1_prev = 0; s2_prev = 0;
    for (int i = 0; i < 5000; i++) begin
      logic exp_we;
      s1 = ($urandom_range(0, 2) == 0);
      s2 = ($urandom_range(0, 2) == 0);
      edit_mode = ($urandom_range(0, 3) != 0);
      dip = 7'($urandom); rdata = 7'($urandom);
      #1;
      exp_we = edit_mode && s2 && !s2_prev;
      if (s2 && !s2_prev && !edit_mode) n_runblock++;
      checks++;
      if (we !== exp_we || (exp_we && wdata !== dip) || addr !== 4'(exp_addr) ||
          dis3 !== 4'(exp_addr) || dis2 !== {1'b0, rdata[6:4]} || dis1 !== rdata[3:0]) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: we=%b addr=%h dis=%h%h%h exp we=%b addr=%h",
                                    i, we, addr, dis3, dis2, dis1, exp_we, exp_addr);
      end
      if (exp_we) n_write++;
      @(posedge clk); #1;
      if (s1 && !s1_prev) begin
        n_step++;
        if (exp_addr == 15) n_wrap++;
        exp_addr = (exp_addr + 1) % 16;
      end
      s1_prev = s1; s2_prev = s2;
    end
    checks++;
    if (n_write == 0 || n_step == 0 || n_wrap == 0 || n_runblock == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
