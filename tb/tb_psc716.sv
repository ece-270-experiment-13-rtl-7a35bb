// tb_psc716: end-to-end self-checking test of the PSC 716 computer at its
// default parameters.
//
// Everything goes through the machine's own switches and buttons: programs
// and data are keyed into memory in edit mode (DIP[7] = 1, DIP[6:0] plus the
// two pushbuttons), the machine is switched to run mode, and results are read
// back from the displays (DIS4 output port, DIS3 / DIS2:DIS1 memory editor)
// and the condition-code LEDs. An instruction-level model of the machine kept
// in the testbench predicts memory, accumulator output, flags and the cycle
// on which HLT takes effect (two clocks per instruction).
//
// Programs run: INA/OUA/HLT; LDA + ADD/SUB/AND + STA on data at 4 and 5 with
// the result at 6; the 11-instruction program that adds, subtracts and ANDs
// data at B, C, D to a DIP input and stores at E and F (also against one
// hand-worked answer); and random 16-word programs, including ones with no
// HLT that run across the end of memory and modify themselves. Mechanisms
// counted, each of which must occur: every opcode, each flag set, a halt, an
// edit-mode write, an edit-address wrap, an edit-to-run switch, a write
// attempt blocked in run mode, and a result watched on the editor display
// while the program runs.
module tb_psc716;
  import psc716_pkg::*;

  logic       clk = 0, rst;
  logic [7:0] dip;
  logic       s1bc, s2bc;
  logic [3:0] dis_hex [4];
  logic [6:0] dis_seg [4];
  flags_t     flags;
  logic       halted;

  int checks = 0, failures = 0;

  psc716 dut (.clk(clk), .rst(rst), .dip(dip), .s1bc(s1bc), .s2bc(s2bc),
              .dis_hex(dis_hex), .dis_seg(dis_seg), .flags(flags), .halted(halted));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_op [8];
  int n_cf = 0, n_nf = 0, n_zf = 0, n_vf = 0, n_halt = 0;
  int n_edit_write = 0, n_addr_wrap = 0, n_mode_switch = 0, n_run_block = 0;
  int n_watch = 0;

  // an execute cycle: processor out of reset, not halted, not fetching
  always @(posedge clk) begin
    if (!dip[7] && !rst && !halted && !dut.ctrl.irl) n_op[dut.opcode]++;
    if (flags.cf) n_cf++;
    if (flags.nf) n_nf++;
    if (flags.zf) n_zf++;
    if (flags.vf) n_vf++;
  end

  // ---------------- instruction-level model ----------------
  logic [6:0] m_mem [16];
  logic [3:0] m_a, m_out, m_pc;
  flags_t     m_f;
  logic       m_halt;

  function automatic int sgn(logic [3:0] v);
    return (v > 7) ? int'(v) - 16 : int'(v);
  endfunction

  task automatic model_reset();
    m_a = 0; m_out = 0; m_pc = 0; m_f = '0; m_halt = 0;
  endtask

  task automatic model_step(input logic [3:0] din);
    logic [6:0] w;
    logic [3:0] d;
    int r, sr;
    if (m_halt) return;
    w = m_mem[m_pc];
    m_pc = m_pc + 1;
    d = m_mem[w[3:0]][3:0];
    case (w[6:4])
      3'b000: m_halt = 1;
      3'b001: begin m_a = d; m_f.nf = m_a[3]; m_f.zf = (m_a == 0); end
      3'b010: begin
        r = int'(m_a) + int'(d); sr = sgn(m_a) + sgn(d);
        m_f.cf = (r > 15); m_f.vf = (sr > 7 || sr < -8);
        m_a = 4'(r); m_f.nf = m_a[3]; m_f.zf = (m_a == 0);
      end
      3'b011: begin
        r = int'(m_a) - int'(d); sr = sgn(m_a) - sgn(d);
        m_f.cf = (int'(m_a) < int'(d)); m_f.vf = (sr > 7 || sr < -8);
        m_a = 4'(r); m_f.nf = m_a[3]; m_f.zf = (m_a == 0);
      end
      3'b100: begin m_a = m_a & d; m_f.nf = m_a[3]; m_f.zf = (m_a == 0); end
      3'b101: m_mem[w[3:0]] = {3'b000, m_a};
      3'b110: begin m_a = din; m_f.nf = m_a[3]; m_f.zf = (m_a == 0); end
      3'b111: m_out = m_a;
    endcase
  endtask

  // ---------------- front-panel helpers ----------------
  function automatic logic [6:0] seg_of(logic [3:0] h);
    logic [6:0] t [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    return t[h];
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic press_s1();
    logic [3:0] prev_addr;
    prev_addr = dis_hex[2];
    s1bc = 1; repeat (2) @(posedge clk); #1;
    s1bc = 0; repeat (2) @(posedge clk); #1;
    if (prev_addr == 4'hF) n_addr_wrap++;
    check("address step", dis_hex[2] === prev_addr + 4'd1);
  endtask

  task automatic press_s2();
    s2bc = 1; repeat (2) @(posedge clk); #1;
    s2bc = 0; repeat (2) @(posedge clk); #1;
  endtask

  task automatic goto_addr(input logic [3:0] a);
    while (dis_hex[2] != a) press_s1();
  endtask

  // read a location through the editor display DIS2:DIS1
  task automatic peek(input logic [3:0] a, output logic [6:0] w);
    goto_addr(a);
    check("DIS2 top bit zero", dis_hex[1][3] === 1'b0);
    for (int i = 0; i < 3; i++) check("segments", dis_seg[i] == seg_of(dis_hex[i]));
    w = {dis_hex[1][2:0], dis_hex[0]};
  endtask

  task automatic enter_edit();
    dip[7] = 1; @(posedge clk); #1;
    check("edit mode resets processor", flags === '0 && dis_hex[3] === 0 && !halted);
  endtask

  // key in all 16 words of the model memory
  task automatic load_program();
    logic [6:0] w;
    enter_edit();
    for (int i = 0; i < 16; i++) begin
      goto_addr(4'(i));
      dip[6:0] = m_mem[i];
      press_s2();
      n_edit_write++;
      check("editor shows written word", {dis_hex[1][2:0], dis_hex[0]} === m_mem[i]);
    end
    for (int i = 0; i < 16; i++) begin
      peek(4'(i), w);
      check("memory after edit", w === m_mem[i]);
    end
  endtask

  // run until HLT or max_instr instructions, compare with the model
  task automatic run_and_check(input string name, input logic [3:0] din, input int max_instr);
    int n_instr, cyc;
    logic [6:0] w;
    model_reset();
    n_instr = 0;
    while (!m_halt && n_instr < max_instr) begin
      model_step(din);
      n_instr++;
    end
    dip[3:0] = din;
    dip[7] = 0;
    n_mode_switch++;
    cyc = 0;
    while (!halted && cyc < 2 * n_instr) begin
      @(posedge clk); #1;
      cyc++;
    end
    if (m_halt) begin
      check({name, ": halts after two clocks per instruction"}, halted && cyc === 2 * n_instr);
      n_halt++;
    end else begin
      check({name, ": still running"}, !halted);
      // stop exactly on an instruction boundary: the next cycle is a fetch
      check({name, ": fetch on boundary"}, dut.ctrl.irl);
    end
    check({name, ": DIS4 output port"}, dis_hex[3] === m_out);
    check({name, ": DIS4 segments"}, dis_seg[3] === seg_of(m_out));
    check({name, ": condition codes"}, flags === m_f);
    if (!m_halt) begin
      // let the run end prev_addr reading memory
      dip[7] = 1; @(posedge clk); #1;
    end
    for (int i = 0; i < 16; i++) begin
      peek(4'(i), w);
      check({name, ": memory"}, w === m_mem[i]);
    end
    if (checks > 0 && failures > 0 && failures < 3)
      $display("  after %s: out=%h flags=%b exp out=%h flags=%b", name, dis_hex[3], flags, m_out, m_f);
  endtask

  function automatic logic [6:0] ins(opcode_e op, logic [3:0] a = 0);
    return {op, a};
  endfunction

  initial begin
    logic [6:0] w;
    for (int i = 0; i < 8; i++) n_op[i] = 0;
    rst = 1; dip = 8'h80; s1bc = 0; s2bc = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;

    // ---- INA, OUA, HLT ----
    for (int i = 0; i < 16; i++) m_mem[i] = 7'($urandom);
    m_mem[0] = ins(OP_INA); m_mem[1] = ins(OP_OUA); m_mem[2] = ins(OP_HLT);
    load_program();
    for (int v = 0; v < 16; v += 5) begin
      run_and_check("INA/OUA/HLT", 4'(v), 100);
      enter_edit();
    end

    // ---- LDA 4; ADD|SUB|AND 5; STA 6; HLT ----
    for (int k = 0; k < 12; k++) begin
      opcode_e op;
      op = (k % 3 == 0) ? OP_ADD : (k % 3 == 1) ? OP_SUB : OP_AND;
      for (int i = 0; i < 16; i++) m_mem[i] = 7'($urandom);
      m_mem[0] = ins(OP_LDA, 4); m_mem[1] = ins(op, 5); m_mem[2] = ins(OP_STA, 6);
      m_mem[3] = ins(OP_HLT);
      m_mem[4] = {3'b000, 4'($urandom)}; m_mem[5] = {3'b000, 4'($urandom)};
      if (k == 0) begin m_mem[4] = 7'h07; m_mem[5] = 7'h01; end  // signed overflow
      if (k == 1) begin m_mem[4] = 7'h03; m_mem[5] = 7'h03; end  // zero
      if (k == 3) begin m_mem[4] = 7'h0F; m_mem[5] = 7'h01; end  // carry out
      load_program();
      run_and_check(op.name(), 4'($urandom), 100);
    end

    // ---- the 11-instruction program with results at E and F ----
    for (int k = 0; k < 6; k++) begin
      logic [3:0] din;
      m_mem[0] = ins(OP_INA);      m_mem[1] = ins(OP_OUA);
      m_mem[2] = ins(OP_ADD, 4'hB); m_mem[3] = ins(OP_STA, 4'hE);
      m_mem[4] = ins(OP_OUA);      m_mem[5] = ins(OP_SUB, 4'hC);
      m_mem[6] = ins(OP_OUA);      m_mem[7] = ins(OP_AND, 4'hD);
      m_mem[8] = ins(OP_OUA);      m_mem[9] = ins(OP_STA, 4'hF);
      m_mem[10] = ins(OP_HLT);
      m_mem[11] = 7'($urandom_range(0, 15)); m_mem[12] = 7'($urandom_range(0, 15));
      m_mem[13] = 7'($urandom_range(0, 15));
      m_mem[14] = 7'($urandom); m_mem[15] = 7'($urandom);
      din = 4'($urandom);
      if (k == 0) begin
        din = 4'h5; m_mem[11] = 7'h03; m_mem[12] = 7'h01; m_mem[13] = 7'h06;
      end
      load_program();
      run_and_check("prelab", din, 100);
      if (k == 0) begin
        // worked by hand: 5+3 = 8 (overflow), 8-1 = 7 (overflow), 7&6 = 6
        peek(4'hE, w); check("prelab hand result E", w == 7'h08);
        peek(4'hF, w); check("prelab hand result F", w == 7'h06);
        check("prelab hand DIS4", dis_hex[3] === 4'h6);
        check("prelab hand flags", flags === '{cf:0, nf:0, zf:0, vf:1});
      end
    end

    // ---- watch a result on the editor display while the program runs, and
    //      check that S2BC cannot write memory in run mode ----
    for (int i = 0; i < 16; i++) m_mem[i] = ins(OP_OUA);
    m_mem[0] = ins(OP_INA); m_mem[1] = ins(OP_STA, 4'hE); m_mem[15] = ins(OP_HLT);
    m_mem[14] = 7'h7F;
    load_program();
    goto_addr(4'hE);
    dip[3:0] = 4'h9; dip[6:4] = 3'b111; dip[7] = 0;
    repeat (4) @(posedge clk); #1;
    check("watched location updated while running", {dis_hex[1][2:0], dis_hex[0]} === 7'h09);
    n_watch++;
    press_s2();
    n_run_block++;
    check("no write in run mode", {dis_hex[1][2:0], dis_hex[0]} === 7'h09);
    repeat (40) @(posedge clk); #1;
    check("watch program halted", halted);
    enter_edit();

    // ---- random programs ----
    for (int k = 0; k < 40; k++) begin
      for (int i = 0; i < 16; i++) begin
        m_mem[i] = 7'($urandom);
        if (m_mem[i][6:4] == 3'b000 && $urandom_range(0, 2) != 0) m_mem[i][6:4] = 3'b111;
      end
      load_program();
      run_and_check("random", 4'($urandom), 24 + k % 7);
      enter_edit();
    end

    // ---- every mechanism must have happened ----
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL opcode %0d never executed", i); end
    end
    check("CF seen", n_cf > 0);
    check("NF seen", n_nf > 0);
    check("ZF seen", n_zf > 0);
    check("VF seen", n_vf > 0);
    check("halt seen", n_halt > 0);
    check("edit write seen", n_edit_write > 0);
    check("edit address wrap seen", n_addr_wrap > 0);
    check("mode switch seen", n_mode_switch > 0);
    check("run-mode write blocked", n_run_block > 0);
    check("watch seen", n_watch > 0);
    $display("mechanisms: ops HLT..OUA = %0d %0d %0d %0d %0d %0d %0d %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7]);
    $display("mechanisms: CF %0d NF %0d ZF %0d VF %0d cycles; halts %0d; edit writes %0d; wraps %0d; runs %0d; run-mode write attempts %0d; watches %0d",
             n_cf, n_nf, n_zf, n_vf, n_halt, n_edit_write, n_addr_wrap, n_mode_switch, n_run_block, n_watch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
