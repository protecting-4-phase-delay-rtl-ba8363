// Protocol controller of the base receiver.
//
// Low-parallelism version (ADVANCED = 0, default): a single C gate with
// inputs done (bus complete) and NOT ack_in (consumer ready) starts the
// sampler. s rises when a complete word is on the bus and the consumer has
// finished the previous transfer. It falls when the bus has returned to the
// spacer and the consumer has acknowledged. The sampler's completion output c
// serves both as request to the bundled-data consumer (req) and as
// acknowledge on the DI bus (ack_out). The two handshakes are interlocked:
// the DI side cannot start the next word before the consumer has
// acknowledged, and vice versa.
//
// Advanced version (ADVANCED = 1): the two handshakes only meet at s+, the
// moment a new word is captured. s rises when done is high, the consumer
// has taken the previous word (flag free) and ack_in is low. s falls as soon
// as done falls, so the DI acknowledge (= c) can return to zero while the
// consumer still holds the previous word. req is its own flip-flop: set
// once per word when c is high, cleared by ack_in. free is set when the
// consumer acknowledges (req & ack_in) and cleared at s+. The input
// register only reloads after s+, so rx_data stays valid while req is high.
// The transition graph of this version is not printed in full; these set
// and clear terms are this design's reading of its description.
module rx_protocol_ctrl #(
  parameter bit ADVANCED = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic done,
  input  logic ack_in,
  input  logic c,
  output logic s,
  output logic req,
  output logic ack_out
);

  if (!ADVANCED) begin : g_simple
    c_element #(.N(2), .INIT(1'b0)) u_c (
      .clk(clk), .rst_n(rst_n), .in({done, ~ack_in}), .q(s)
    );

    assign req     = c;
    assign ack_out = c;
  end else begin : g_adv
    logic free;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s    <= 1'b0;
        req  <= 1'b0;
        free <= 1'b1;
      end else begin
        if (!done)                          s <= 1'b0;
        else if (!s && free && !ack_in)     s <= 1'b1;

        if (ack_in)                         req <= 1'b0;
        else if (c && !free && !req)        req <= 1'b1;

        if (req && ack_in)                  free <= 1'b1;
        else if (done && !s && free && !ack_in) free <= 1'b0;
      end
    end

    assign ack_out = c;
  end

endmodule
