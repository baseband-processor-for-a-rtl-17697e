// rng: 16-bit pseudo-random number source for RN16 values, handles and slot counters.
// A maximal-length Fibonacci LFSR (taps 16, 14, 13, 11) that advances every master cycle while
// enabled, so the value seen by the core depends on how long the tag has been powered and on the
// reader's timing. The document only names a random number generator; the LFSR is this design's
// choice. q never becomes zero. Reset loads the seed.
module rng #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [15:0] q
);
  logic fb;
  assign fb = q[15] ^ q[13] ^ q[12] ^ q[10];

  always_ff @(posedge clk) begin
    if (rst)     q <= SEED;
    else if (en) q <= {q[14:0], fb};
  end
endmodule
