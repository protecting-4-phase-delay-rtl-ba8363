// Acknowledgment generator of the D flip-flop transmitter.
//
// It decides when the output register captures a new code word (trg) and
// acknowledges the sender (ack_out). Two versions, chosen by ADVANCED:
//
// * Simple controller (ADVANCED = 0): one C gate on req and the inverted
//   ack_in. ack_out rises once req is high and the DI channel is idle, and
//   falls once req is low and the receiver has acknowledged. The two
//   handshakes are interlocked: ack_out- waits for ack_in+, and the spacer
//   (and with it ack_in-) only follows ack_out-. The reset generator is then
//   driven by the falling edge of ack_out (see dff_tx).
// * Advanced controller (ADVANCED = 1): the two handshakes run independently
//   and only meet at ack_out+, which needs req = 1, the previous word fully
//   acknowledged by the DI side and the channel idle again:
//     req+ -> ack_out+ -> req- -> ack_out- -> req+,
//     ack_out+ -> t+ -> ack_in+ -> t- -> ack_in- -> ack_out+.
//   The internal variable t records that a captured word still waits for
//   its acknowledgment. The reset generator is driven by ack_in.
//
// trg is high during the clock cycle that ends with ack_out rising; the
// output register loads on that edge. ack_in here is the reset generator's
// ack'_in output. Both orderings follow the document; the C gate's inputs in
// the simple version and the clocked realisation are this design's reading.
module dff_tx_ctrl #(
  parameter bit ADVANCED = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic ack_in,
  output logic trg,
  output logic ack_out
);

  if (ADVANCED) begin : g_adv
    logic t;
    assign trg = req && !ack_out && !t && !ack_in;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ack_out <= 1'b0;
        t       <= 1'b0;
      end else begin
        if (trg)                 ack_out <= 1'b1;
        else if (!req)           ack_out <= 1'b0;
        if (trg)                 t <= 1'b1;
        else if (t && ack_in)    t <= 1'b0;
      end
    end
  end else begin : g_simple
    assign trg = req && !ack_in && !ack_out;
    c_element #(.N(2), .INIT(1'b0)) u_c (
      .clk(clk), .rst_n(rst_n), .in({req, ~ack_in}), .q(ack_out)
    );
  end

endmodule
