// Controller of the AND-masking transmitter.
//
// It runs the signal transition graph of the transmitter: a (delayed) request
// raises en, which lets the encoded word through the AND array onto the DI
// bus; the receiver's acknowledge (ack_in+) lowers en again, which puts the
// spacer on the bus; only then is the sender acknowledged (ack_out+). The
// sender withdraws its request (req-) and ack_out falls. A new en+ also
// waits for ack_in- so that the receiver has seen the spacer:
//   req+ -> en+ -> ack_in+ -> en- -> ack_out+ -> req- -> ack_out-,
//   ack_in- -> en+,  ack_out- -> req+.
// Clocked realisation: each transition takes one clk edge; the state encodes
// what the speed-independent circuit keeps in its C gates and csc variable.
module and_mask_tx_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic ack_in,
  output logic en,
  output logic ack_out
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,  // spacer on the bus, waiting for req+ (and ack_in-)
    S_DATA  = 2'd1,  // en = 1: code word on the bus, waiting for ack_in+
    S_NULL  = 2'd2,  // en = 0 again: spacer driven, about to acknowledge
    S_ACK   = 2'd3   // ack_out = 1, waiting for req-
  } state_e;

  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE: if (req && !ack_in) state <= S_DATA;
        S_DATA: if (ack_in)         state <= S_NULL;
        S_NULL:                     state <= S_ACK;
        S_ACK:  if (!req)           state <= S_IDLE;
        default:                    state <= S_IDLE;
      endcase
    end
  end

  assign en      = (state == S_DATA);
  assign ack_out = (state == S_ACK);

endmodule
