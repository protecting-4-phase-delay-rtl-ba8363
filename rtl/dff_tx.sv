// D flip-flop transmitter of the fault-tolerant DI link.
//
// An alternative to the AND-masking transmitter. The payload is encoded
// continuously (di_encoder, no phase input), and an output register drives
// the DI rails. The register captures the code word when the controller
// raises ack_out (trg), and its reset input produces the spacer, so no
// masking logic is needed in front of it.
//
// * ADVANCED = 1 (default): the advanced controller with the reset
//   generator of dff_tx_rst_gen (version chosen by RST_VERSION_B). The
//   register is cleared by ack_in (version A, for as long as it is high)
//   or by a DELTA_RST pulse on its rising edge (version B).
// * ADVANCED = 0: the simple controller. The reset is a pulse of DELTA_RST
//   cycles started by the falling edge of ack_out.
//
// The request is delayed by DELTA_REQ cycles on its rising edge only, so
// the encoder output is settled when the register captures it. The sender
// must keep data stable while req is high. DELTA_RST must be short enough
// that the reset is over before the next capture (the reset wins if they
// meet); the testbench checks that they never do.
//
// Interface: 4-phase bundled data on the input (req, ack_out, data),
// 4-phase return-to-zero DI on the output (rails, ack_in). Latency: the
// code word appears DELTA_REQ + 1 cycles after req rises (idle channel).
module dff_tx
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W        = 8,
  parameter di_code_e    CODE          = CODE_3OF6,
  parameter int unsigned DELTA_REQ     = 6,
  parameter bit          ADVANCED      = 1'b1,
  parameter bit          RST_VERSION_B = 1'b1,
  parameter int unsigned DELTA_RST     = 1,
  localparam int unsigned RAILS        = total_rails(DATA_W, CODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  output logic              ack_out,
  input  logic [DATA_W-1:0] data,
  output logic [RAILS-1:0]  rails,
  input  logic              ack_in
);

  logic             req_d, trg, ack_ctrl_in, rst;
  logic [RAILS-1:0] code;

  rise_delay #(.DELAY(DELTA_REQ)) u_dreq (.clk(clk), .rst_n(rst_n), .a(req), .y(req_d));

  di_encoder #(.DATA_W(DATA_W), .CODE(CODE)) u_enc (.data(data), .rails(code));

  dff_tx_ctrl #(.ADVANCED(ADVANCED)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .req(req_d), .ack_in(ack_ctrl_in), .trg(trg), .ack_out(ack_out)
  );

  if (ADVANCED) begin : g_adv_rst
    dff_tx_rst_gen #(.VERSION_B(RST_VERSION_B), .DELTA_RST(DELTA_RST)) u_rst (
      .clk(clk), .rst_n(rst_n), .ack_in(ack_in), .ack_in_d(ack_ctrl_in), .rst(rst)
    );
  end else begin : g_simple_rst
    // pulse generator on the falling edge of ack_out: DELTA_RST cycles,
    // starting in the cycle right after the edge
    localparam int unsigned CW = $clog2(DELTA_RST + 1);
    logic          ack_q;
    logic [CW-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ack_q <= 1'b0;
        cnt   <= '0;
      end else begin
        ack_q <= ack_out;
        if (ack_q && !ack_out) cnt <= CW'(DELTA_RST - 1);
        else if (cnt != '0)    cnt <= cnt - 1'b1;
      end
    end
    assign rst = (ack_q && !ack_out) || (cnt != '0);
    assign ack_ctrl_in = ack_in;
  end

  // Output register: the reset clears it (spacer), trg loads the code word.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   rails <= '0;
    else if (rst) rails <= '0;
    else if (trg) rails <= code;
  end

endmodule
