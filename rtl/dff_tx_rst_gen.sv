// Reset generator of the D flip-flop transmitter (advanced controller).
//
// The output register of the transmitter is cleared through its reset
// input, which is how the spacer is produced. Two versions, chosen by
// VERSION_B:
//
// * Version A (VERSION_B = 0): the DI acknowledge itself is the reset, so
//   the register stays cleared for as long as ack_in is high. The
//   acknowledge passed on to the acknowledgment generator (ack_in_d) is
//   ack_in delayed by DELTA_RST cycles on both edges, which leaves time
//   between the end of the reset and the next capture.
// * Version B (VERSION_B = 1): a pulse of DELTA_RST cycles on the rising
//   edge of ack_in is the reset (ack_in AND NOT ack_in delayed), and
//   ack_in is passed on undelayed.
//
// Structure from the document; the delay line is a shift register of
// DELTA_RST clock cycles (at least 1).
module dff_tx_rst_gen #(
  parameter bit          VERSION_B = 1'b1,
  parameter int unsigned DELTA_RST = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ack_in,
  output logic ack_in_d,
  output logic rst
);

  if (DELTA_RST < 1) begin : g_bad_delta
    $error("dff_tx_rst_gen: DELTA_RST must be at least 1 cycle");
  end

  logic [DELTA_RST-1:0] line;
  logic                 delayed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) line <= '0;
    else begin
      line[0] <= ack_in;
      for (int i = 1; i < DELTA_RST; i++) line[i] <= line[i-1];
    end
  end
  assign delayed = line[DELTA_RST-1];

  if (VERSION_B) begin : g_b
    assign ack_in_d = ack_in;
    assign rst      = ack_in && !delayed;
  end else begin : g_a
    assign ack_in_d = delayed;
    assign rst      = ack_in;
  end

endmodule
