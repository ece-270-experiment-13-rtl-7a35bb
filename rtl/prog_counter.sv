// prog_counter: the 4-bit program counter (PC).
//
// Holds the address of the next instruction. On a rising clock edge with
// PCC (count) = 1 it increments by one, wrapping from 15 to 0; otherwise it
// holds. A synchronous reset returns it to address 0, where every program
// starts. The count/hold behaviour is the machine's; the synchronous reset
// and the wrap at the top of memory are this design's choices.
module prog_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         pcc,
  output logic [W-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst)      pc <= '0;
    else if (pcc) pc <= pc + 1'b1;
  end
endmodule
