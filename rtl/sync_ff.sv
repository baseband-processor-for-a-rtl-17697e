// sync_ff: falling-edge synchronising flip-flop.
// Samples an asynchronous input on the falling edge of the master clock so that logic clocked on
// the rising edge sees a value that has had half a period to settle. The processor uses one for
// the demodulated reader signal (data_dem -> data_in) and one for the baseband reset. The falling
// edge follows the document; having no reset of its own is this design's choice (the cell is
// itself the reset synchroniser).
// Ports: clk (master clock), d (asynchronous in), q (synchronised out). Latency: half a cycle.
module sync_ff (
  input  logic clk,
  input  logic d,
  output logic q
);
  always_ff @(negedge clk) q <= d;
endmodule
