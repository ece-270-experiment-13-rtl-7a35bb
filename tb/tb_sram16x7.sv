// tb_sram16x7: self-checking test of the 16 x 7 flip-flop memory. Writes
// random words to random locations and checks both asynchronous read ports
// against a copy of the contents kept in the testbench; a cycle with WE = 0
// must change nothing, and a write appears on the read ports right after
// the clock edge.
module tb_sram16x7;
  logic clk = 0, we;
  logic [3:0] waddr, ra, rb;
  logic [6:0] wdata, da, db;
  logic [6:0] ref_mem [16];
  int checks = 0, failures = 0;

  sram16x7 dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every location first
    for (int i = 0; i < 16; i++) begin
      we = 1; waddr = 4'(i); wdata = 7'($urandom); ref_mem[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we = $urandom_range(0, 1); waddr = 4'($urandom); wdata = 7'($urandom);
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      we = 0;
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      checks++;
      if (da !== ref_mem[ra] || db !== ref_mem[rb]) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: [%h]=%h [%h]=%h exp %h %h", i, ra, da, rb, db, ref_mem[ra], ref_mem[rb]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
