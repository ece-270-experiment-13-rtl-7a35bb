// alu: the PSC 716 arithmetic logic unit with its accumulator A and the
// condition-code register (CF, NF, ZF, VF).
//
// On a rising clock edge with ALE = 1 the ALU performs the function selected
// by {ALX, ALY} on A and the data bus and writes the result back to A:
//   00 ADD  A <- A + data   CF NF ZF VF updated
//   01 SUB  A <- A - data   CF NF ZF VF updated
//   10 LDA  A <- data       NF ZF updated, CF VF kept
//   11 AND  A <- A & data   NF ZF updated, CF VF kept
// With ALE = 0, A and the flags keep their values. Add and subtract go
// through the cla4 adder/subtractor, which also forms their flags; LDA and
// AND form NF and ZF from their own result. Arithmetic is two's complement.
// The function table is the machine's; the synchronous reset that clears A
// and all flags is this design's choice.
module alu
  import psc716_pkg::*;
(
  input  logic             clk,
  input  logic             rst,     // synchronous, clears A and flags
  input  logic             ale,
  input  alu_fn_e          fn,      // {ALX, ALY}
  input  logic [DATA_W-1:0] dbus,   // data bus
  output logic [DATA_W-1:0] a,      // accumulator
  output flags_t           flags
);
  logic [DATA_W-1:0] sum;
  logic              c_cf, c_nf, c_zf, c_vf;
  logic [DATA_W-1:0] res;
  flags_t            nflags;

  cla4 u_cla4 (
    .x  (a),
    .y  (dbus),
    .sub(fn == ALU_SUB),
    .s  (sum),
    .cf (c_cf),
    .nf (c_nf),
    .zf (c_zf),
    .vf (c_vf)
  );

  always_comb begin
    nflags = flags;
    unique case (fn)
      ALU_ADD, ALU_SUB: begin
        res    = sum;
        nflags = '{cf: c_cf, nf: c_nf, zf: c_zf, vf: c_vf};
      end
      ALU_LDA: res = dbus;
      ALU_AND: res = a & dbus;
      default: res = a;
    endcase
    if (fn == ALU_LDA || fn == ALU_AND) begin
      nflags.nf = res[DATA_W-1];
      nflags.zf = (res == '0);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a     <= '0;
      flags <= '0;
    end else if (ale) begin
      a     <= res;
      flags <= nflags;
    end
  end
endmodule
