// mem_editor: the PSC 716 memory editor.
//
// Keeps a 4-bit edit address. A press of the right pushbutton (S1BC)
// advances the address by one, wrapping from F to 0. In edit mode (DIP[7] =
// 1) a press of the left pushbutton (S2BC) writes the 7-bit value set on
// DIP[6:0] into the memory location at the edit address; the write request
// lasts exactly one clock cycle. The address is shown as one hex digit on
// DIS3 and the contents of that location as two hex digits on DIS2:DIS1
// (DIS2 holds the top three bits).
//
// The pushbuttons are taken as already debounced and synchronous to CLK; a
// press is detected as a rising edge of the button level, one clock after it
// appears. Stepping the address also works in run mode, so a result location
// can be watched while a program runs. The keys, displays and edit-mode
// switch follow the machine's description; the edge detection, the run-mode
// stepping and the reset of the address to 0 are this design's choices.
module mem_editor
  import psc716_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               edit_mode,  // DIP[7]
  input  logic               s1bc,       // advance address
  input  logic               s2bc,       // write DIP[6:0]
  input  logic [INSTR_W-1:0] dip_word,   // DIP[6:0]
  input  logic [INSTR_W-1:0] mem_rdata,  // contents at edit_addr
  output logic [ADDR_W-1:0]  edit_addr,
  output logic               we,
  output logic [INSTR_W-1:0] wdata,
  output logic [3:0]         dis3,
  output logic [3:0]         dis2,
  output logic [3:0]         dis1
);
  logic s1_q, s2_q;
  logic s1_press, s2_press;

  assign s1_press = s1bc & ~s1_q;
  assign s2_press = s2bc & ~s2_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_q      <= 1'b0;
      s2_q      <= 1'b0;
      edit_addr <= '0;
    end else begin
      s1_q <= s1bc;
      s2_q <= s2bc;
      if (s1_press) edit_addr <= edit_addr + 1'b1;
    end
  end

  assign we    = edit_mode & s2_press;
  assign wdata = dip_word;
  assign dis3  = edit_addr;
  assign dis2  = {1'b0, mem_rdata[INSTR_W-1:ADDR_W]};
  assign dis1  = mem_rdata[ADDR_W-1:0];

  // A press writes once: the strobe never lasts two cycles, and never
  // happens in run mode.
  a_single_write: assert property (@(posedge clk) disable iff (rst) we |=> !we);
  a_edit_only:    assert property (@(posedge clk) disable iff (rst) we |-> edit_mode);
endmodule
