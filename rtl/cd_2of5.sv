// Completion detector for one 2-of-5 block.
//
// The rails form three groups: {x0,x1} (NOR), {x4} (inverter) and {x2,x3}
// (NOR). Each pair of group signals drives a two-input C gate that starts at
// one; a NAND of the three C outputs is done. done rises once two different
// groups carry a one and falls once all rails are back to zero. The two
// 2-of-5 words whose ones share a group (00011, 01100) never complete, so the
// detector only accepts the eight used code words.
// done follows the rails with one clk cycle of latency (C gate state).
module cd_2of5 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] x,
  output logic       done
);

  logic ga, gb, gc;
  logic cab, cac, cbc;

  assign ga = ~(x[0] | x[1]);
  assign gb = ~x[4];
  assign gc = ~(x[2] | x[3]);

  c_element #(.N(2), .INIT(1'b1)) u_cab (.clk(clk), .rst_n(rst_n), .in({ga, gb}), .q(cab));
  c_element #(.N(2), .INIT(1'b1)) u_cac (.clk(clk), .rst_n(rst_n), .in({ga, gc}), .q(cac));
  c_element #(.N(2), .INIT(1'b1)) u_cbc (.clk(clk), .rst_n(rst_n), .in({gb, gc}), .q(cbc));

  assign done = ~(cab & cac & cbc);

endmodule
