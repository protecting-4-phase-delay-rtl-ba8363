// AND-masking transmitter of the fault-tolerant DI link.
//
// The bundled-data payload is encoded (data blocks plus one check block, see
// di_encoder) while the controller holds en low, so the AND array (spacer
// insertion) keeps every rail at zero. Delta_req after req rises the
// controller raises en and the code word appears on the bus. When the receiver
// acknowledges, en falls (spacer) and, Delta_ack later, the sender is
// acknowledged. The sender must keep data stable while req is high.
// Both delays act on rising edges only. The rails are registered so that the
// bus only changes on clk edges.
//
// Interface: 4-phase bundled data on the input side (req, ack_out, data),
// 4-phase return-to-zero DI on the output side (rails, ack_in).
module and_mask_tx
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W    = 8,
  parameter di_code_e    CODE      = CODE_3OF6,
  parameter int unsigned DELTA_REQ = 6,
  parameter int unsigned DELTA_ACK = 0,
  localparam int unsigned RAILS    = total_rails(DATA_W, CODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  output logic              ack_out,
  input  logic [DATA_W-1:0] data,
  output logic [RAILS-1:0]  rails,
  input  logic              ack_in
);

  logic             req_d, en, ack_ctrl;
  logic [RAILS-1:0] code;

  rise_delay #(.DELAY(DELTA_REQ)) u_dreq (.clk(clk), .rst_n(rst_n), .a(req), .y(req_d));

  di_encoder #(.DATA_W(DATA_W), .CODE(CODE)) u_enc (.data(data), .rails(code));

  and_mask_tx_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .req(req_d), .ack_in(ack_in), .en(en), .ack_out(ack_ctrl)
  );

  rise_delay #(.DELAY(DELTA_ACK)) u_dack (.clk(clk), .rst_n(rst_n), .a(ack_ctrl), .y(ack_out));

  // Spacer insertion: one AND gate per rail.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rails <= '0;
    else        rails <= code & {RAILS{en}};
  end

endmodule
