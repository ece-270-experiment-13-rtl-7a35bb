// out_port: the PSC 716 output port, a 4-bit register of edge-triggered D
// flip-flops whose value is shown on DIS4.
//
// On a rising clock edge with LD = 1 (execute cycle of OUA) it takes the
// accumulator; otherwise it holds. Flip-flops rather than latches follow the
// machine's description; the synchronous reset to 0 is this design's choice.
module out_port #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end
endmodule
