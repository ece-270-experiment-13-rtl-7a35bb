// tb_out_port: self-checking test of the output port register: reset to 0,
// load on LD, hold otherwise.
module tb_out_port;
  logic clk = 0, rst, ld;
  logic [3:0] d, q, exp_q;
  int checks = 0, failures = 0;

  out_port dut (.clk(clk), .rst(rst), .ld(ld), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 1; d = 4'hF;
    @(posedge clk); #1;
    checks++; if (q !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0; exp_q = 0;
    for (int i = 0; i < 1000; i++) begin
      ld = $urandom_range(0, 1); d = 4'($urandom);
      @(posedge clk); #1;
      if (ld) exp_q = d;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: q=%h exp %h", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
