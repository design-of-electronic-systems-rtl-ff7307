// sdata_sampler: chooses the clock edge on which the serial data line of the
// cache protocol is sampled. With sample_neg = 0 the line is taken at the
// rising edge (the value is passed straight to the controller's registers);
// with sample_neg = 1 it is captured on the falling edge, in the middle of the
// bit, and that capture is what the controller uses at the next rising edge.
// Both settings give the controller the same bit in the same cycle; the
// falling-edge one adds half a clock of margin on a slow board wire.
module sdata_sampler (
  input  logic clk,
  input  logic sample_neg,
  input  logic line,
  output logic bit_out
);
  logic neg_q;

  always_ff @(negedge clk)
    neg_q <= line;

  assign bit_out = sample_neg ? neg_q : line;
endmodule
