// Fault-tolerant 4-phase delay-insensitive link (top level).
//
// A bundled-data sender hands DATA_W-bit words to the AND-masking transmitter,
// which sends each word over a return-to-zero DI bus as m-of-n data blocks
// plus one 1-of-4 check block; the base receiver waits for a complete word,
// checks it and, while a transient fault on the bus disturbs it, keeps
// resampling before acknowledging. The default is the evaluated link: 8 bits,
// two 3-of-6 data blocks and one check block, 16 rails. CODE_2OF5 selects
// 2-of-5 data blocks with a 1-of-4/1-of-2 last block instead.
// TX_DFF = 1 replaces the AND-masking transmitter by the D flip-flop
// transmitter (register reset makes the spacer), with its simple or
// advanced controller and reset generator version A or B; the evaluated
// link, and hence the default, uses the AND-masking transmitter.
// RX_DUAL = 1 replaces the base receiver by the dual-use completion detector
// receiver (latches in front of the completion detector); the evaluated link
// uses the base receiver. RX_SAMPLER_B = 0 gives the base receiver sampler
// version A (a trg pulse per snapshot) instead of version B, and
// RX_CTRL_ADV = 1 its advanced protocol controller instead of the C gate.
//
// The bus wires between the two ends have unknown delays and are where the
// transient faults strike, so both ends are brought out: dibus_tx/dibus_ack_tx
// at the transmitter, dibus_rx/dibus_ack at the receiver. Connect them
// directly, or through a model of the wires. tx and rx share clk here; each
// end only uses it locally to evaluate its own handshake logic.
module ft_di_link
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W    = 8,
  parameter di_code_e    CODE      = CODE_3OF6,
  parameter int unsigned DELTA_REQ = 6,
  parameter int unsigned DELTA_ACK = 0,
  parameter int unsigned DELTA_ED  = 6,
  parameter int unsigned DELTA_P   = 1,
  parameter bit          TX_DFF        = 1'b0,
  parameter bit          RX_DUAL       = 1'b0,
  parameter bit          RX_SAMPLER_B  = 1'b1,
  parameter bit          RX_CTRL_ADV   = 1'b0,
  parameter bit          DFF_ADVANCED  = 1'b1,
  parameter bit          DFF_RST_VER_B = 1'b1,
  parameter int unsigned DFF_DELTA_RST = 1,
  localparam int unsigned RAILS    = total_rails(DATA_W, CODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  // bundled-data sender side
  input  logic [DATA_W-1:0] tx_data,
  input  logic              tx_req,
  output logic              tx_ack,
  // DI bus, transmitter end
  output logic [RAILS-1:0]  dibus_tx,
  input  logic              dibus_ack_tx,
  // DI bus, receiver end
  input  logic [RAILS-1:0]  dibus_rx,
  output logic              dibus_ack,
  // bundled-data consumer side
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_req,
  input  logic              rx_ack
);

  if (TX_DFF) begin : g_dff
    dff_tx #(
      .DATA_W(DATA_W), .CODE(CODE), .DELTA_REQ(DELTA_REQ), .ADVANCED(DFF_ADVANCED),
      .RST_VERSION_B(DFF_RST_VER_B), .DELTA_RST(DFF_DELTA_RST)
    ) u_tx (
      .clk(clk), .rst_n(rst_n), .req(tx_req), .ack_out(tx_ack), .data(tx_data),
      .rails(dibus_tx), .ack_in(dibus_ack_tx)
    );
  end else begin : g_and
    and_mask_tx #(
      .DATA_W(DATA_W), .CODE(CODE), .DELTA_REQ(DELTA_REQ), .DELTA_ACK(DELTA_ACK)
    ) u_tx (
      .clk(clk), .rst_n(rst_n), .req(tx_req), .ack_out(tx_ack), .data(tx_data),
      .rails(dibus_tx), .ack_in(dibus_ack_tx)
    );
  end

  if (RX_DUAL) begin : g_rx_dual
    dual_use_cd_receiver #(
      .DATA_W(DATA_W), .CODE(CODE), .DELTA_ED(DELTA_ED), .DELTA_P(DELTA_P)
    ) u_rx (
      .clk(clk), .rst_n(rst_n), .rails(dibus_rx), .dibus_ack(dibus_ack),
      .rx_data(rx_data), .rx_req(rx_req), .rx_ack(rx_ack)
    );
  end else begin : g_rx_base
    base_receiver #(
      .DATA_W(DATA_W), .CODE(CODE), .DELTA_ED(DELTA_ED), .DELTA_P(DELTA_P),
      .SAMPLER_B(RX_SAMPLER_B), .CTRL_ADV(RX_CTRL_ADV)
    ) u_rx (
      .clk(clk), .rst_n(rst_n), .rails(dibus_rx), .dibus_ack(dibus_ack),
      .rx_data(rx_data), .rx_req(rx_req), .rx_ack(rx_ack)
    );
  end

endmodule
