// shift_register: the 16-bit register that collects decoded forward-link bits.
// On every en_pulse_shift trigger the newest bit enters at q[0] and the older bits move up, so
// q[n-1:0] always holds the last n bits with the earliest of them at q[n-1]. The width is the
// document's; the shift direction and the synchronous clear at a frame start are this design's.
// Timing: q is updated at the clock edge where en_pulse_shift is high.
module shift_register #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             en_pulse_shift,
  input  logic             bit_in,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst || clr)          q <= '0;
    else if (en_pulse_shift) q <= {q[WIDTH-2:0], bit_in};
  end
endmodule
