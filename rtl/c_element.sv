// Muller C gate with N inputs.
//
// The output goes to one once every input is one, to zero once every input is
// zero, and keeps its value otherwise (an AND gate with hysteresis). In this
// clocked realisation of the link the state is a flip-flop updated on every
// clk edge, so the output follows its inputs with one cycle of latency. INIT
// is the value after reset (the transmitter controller of the AND-masking
// transmitter starts its C gates at one, the other uses start at zero).
module c_element #(
  parameter int unsigned N    = 2,
  parameter bit          INIT = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= INIT;
    else if (&in)     q <= 1'b1;
    else if (!(|in))  q <= 1'b0;
  end

endmodule
