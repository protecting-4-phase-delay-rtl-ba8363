// Controller of the dual-use completion detector receiver.
//
// Its behaviour follows the signal transition graph of that receiver:
//   c+ -> ack_out+ and req+ (req+ also waits for the previous ack_in-),
//   ack_in+ -> req- and f_en+,
//   c- (after f_en+ and ack_out+) -> f_en-,
//   f_en- -> ack_out-, which lets the sampler raise c for the next word.
// c is the sampler's completion output, req/ack_in the bundled-data handshake
// with the consumer, ack_out the acknowledge on the DI bus. f_en forces the
// input latches transparent, so that the spacer can reach the completion
// detector while the sampler still holds trg high.
//
// Clocked realisation (own choice): each output is a flip-flop with a set
// and a clear condition taken from the graph, so every event follows its
// causes by one clock cycle.
//   req:     set on c & ~f_en & ~ack_in & ~req, cleared on ack_in.
//   f_en:    set on req & ack_in, cleared on ~c.
//   ack_out: set on c, cleared on ~c & ~f_en.
// The f_en set term uses req rather than c. An ack_in still high from the
// previous word then cannot open the latches too early.
module dual_use_rx_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic c,
  input  logic ack_in,
  output logic req,
  output logic f_en,
  output logic ack_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req     <= 1'b0;
      f_en    <= 1'b0;
      ack_out <= 1'b0;
    end else begin
      if (ack_in)                         req <= 1'b0;
      else if (c && !f_en && !req)        req <= 1'b1;

      if (req && ack_in)                  f_en <= 1'b1;
      else if (!c)                        f_en <= 1'b0;

      if (c)                              ack_out <= 1'b1;
      else if (!f_en)                     ack_out <= 1'b0;
    end
  end

endmodule
