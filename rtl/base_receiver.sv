// Base receiver of the fault-tolerant DI link.
//
// The completion detector watches the DI rails. When the bus is complete and
// the consumer is ready, the protocol controller starts the sampler, whose
// rising trg edge loads the input register with a snapshot of the rails. The
// snapshot is decoded and checked (rx_error_detect). If a transient fault
// corrupted it (check block mismatch or unused code word) the sampler pulls
// trg low for Delta_P and takes a new snapshot, until the faults have
// vanished. Then c rises: the decoded payload is offered to the consumer
// (rx_req) and the transmitter is acknowledged (dibus_ack) at the same time.
//
// SAMPLER_B = 0 uses sampler version A, whose trg is a Delta_P pulse; the
// register still loads on the rising edge, so the rest is unchanged.
//
// CTRL_ADV = 1 uses the advanced protocol controller, which decouples the
// DI acknowledge from the consumer handshake.
//
// Timing: the input register loads on the clk edge after trg rises, so
// DELTA_ED must be at least 2. rx_data is valid while rx_req is high.
module base_receiver
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W   = 8,
  parameter di_code_e    CODE     = CODE_3OF6,
  parameter int unsigned DELTA_ED = 6,
  parameter int unsigned DELTA_P  = 1,
  parameter bit          SAMPLER_B = 1'b1,
  parameter bit          CTRL_ADV  = 1'b0,
  localparam int unsigned RAILS   = total_rails(DATA_W, CODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RAILS-1:0]  rails,
  output logic              dibus_ack,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_req,
  input  logic              rx_ack
);

  if (DELTA_ED < 2) begin : g_bad_delta
    $error("base_receiver: DELTA_ED must be at least 2 cycles");
  end

  logic             done, s, trg, trg_q, c;
  logic             checkblock_error, decode_error, error;
  logic [RAILS-1:0] in_reg;

  bus_cd #(.DATA_W(DATA_W), .CODE(CODE)) u_cd (
    .clk(clk), .rst_n(rst_n), .rails(rails), .done(done)
  );

  // Input register, triggered by the rising edge of trg.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trg_q  <= 1'b0;
      in_reg <= '0;
    end else begin
      trg_q <= trg;
      if (trg && !trg_q) in_reg <= rails;
    end
  end

  rx_error_detect #(.DATA_W(DATA_W), .CODE(CODE)) u_ed (
    .rails(in_reg), .data(rx_data),
    .checkblock_error(checkblock_error), .decode_error(decode_error), .error(error)
  );

  sampler #(.DELTA_ED(DELTA_ED), .DELTA_P(DELTA_P), .VERSION_B(SAMPLER_B)) u_smp (
    .clk(clk), .rst_n(rst_n), .s(s), .error(error), .trg(trg), .c(c)
  );

  rx_protocol_ctrl #(.ADVANCED(CTRL_ADV)) u_pc (
    .clk(clk), .rst_n(rst_n), .done(done), .ack_in(rx_ack), .c(c),
    .s(s), .req(rx_req), .ack_out(dibus_ack)
  );

endmodule
