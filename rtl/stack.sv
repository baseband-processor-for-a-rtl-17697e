// stack: register file for the parameters of the received command.
// The receive FSM writes one field per register (we/waddr/wdata) and the core reads them back
// through an asynchronous read port. Only the addressed register is loaded, which is how the
// document keeps the other registers idle. Depth and width are this design's choice (16 x 16).
// Timing: a write lands at the clock edge; rdata follows raddr combinationally.
module stack #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) if (we) regs[waddr] <= wdata;
  assign rdata = regs[raddr];
endmodule
