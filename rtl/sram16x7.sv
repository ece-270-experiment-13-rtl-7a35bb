// sram16x7: the PSC 716 main memory, 16 words of 7 bits built from
// edge-triggered D flip-flops.
//
// One write port: on a rising clock edge with WE = 1, WDATA is stored at
// WADDR. Two asynchronous read ports: port A serves the processor (the
// address bus), port B serves the memory editor's display, so a location can
// be watched while a program runs. Contents are not reset, as in a real
// SRAM. The size and the flip-flop storage follow the machine's description;
// the second read port is this design's choice.
module sram16x7 #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 7,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
