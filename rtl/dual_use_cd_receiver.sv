// Dual-use completion detector receiver: a variant of the base receiver in
// which the completion detector sits behind the input latches.
//
// The input latches are transparent while en = ~trg | f_en is high. At rest
// trg and f_en are low, so the DI rails pass through to the completion
// detector and to the error detection logic. When the detector reports a
// complete word, done drives the sampler's s input directly. The sampler
// raises trg, which closes the latches on the current snapshot. If the
// snapshot holds an error, the sampler pulls trg low for Delta_P, which
// opens the latches again and takes a new snapshot. Once a snapshot is
// error-free, c rises. The controller (dual_use_rx_ctrl) then requests the
// consumer and acknowledges the DI bus. When the consumer acknowledges,
// f_en opens the latches so that the spacer reaches the completion detector.
// done falls, the sampler clears c and trg, f_en falls, and ack_out falls.
//
// Only version B of the sampler works here: its trg stays high during the
// error-detection wait, keeping the latches closed.
//
// Interface: as base_receiver. rails from the DI bus and dibus_ack back to
// it. rx_data/rx_req/rx_ack form the 4-phase bundled-data consumer port.
// rx_data is valid while rx_req is high.
//
// Clocked realisation (own choice): a latch is a register that loads every
// cycle while en is high. The snapshot is the rails at the clock edge where
// trg rises, so error detection may start on the next cycle. The OR of trg
// and f_en is evaluated from registered signals, so the glitch hazard of
// the asynchronous OR gate (the falling trg must reach it before the falling
// f_en) cannot occur. The reuse of completion-detector gates for decoding
// is a gate-level saving. It is not copied here: the detector, decoder and
// error checker are the same blocks as in the base receiver.
module dual_use_cd_receiver
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W   = 8,
  parameter di_code_e    CODE     = CODE_3OF6,
  parameter int unsigned DELTA_ED = 6,
  parameter int unsigned DELTA_P  = 1,
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

  logic             done, trg, c, f_en, en;
  logic             checkblock_error, decode_error, error;
  logic [RAILS-1:0] latch_q;

  assign en = !trg || f_en;

  // Input latches: follow the rails while en is high.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_q <= '0;
    end else begin
      if (en) latch_q <= rails;
    end
  end

  bus_cd #(.DATA_W(DATA_W), .CODE(CODE)) u_cd (
    .clk(clk), .rst_n(rst_n), .rails(latch_q), .done(done)
  );

  rx_error_detect #(.DATA_W(DATA_W), .CODE(CODE)) u_ed (
    .rails(latch_q), .data(rx_data),
    .checkblock_error(checkblock_error), .decode_error(decode_error), .error(error)
  );

  sampler #(.DELTA_ED(DELTA_ED), .DELTA_P(DELTA_P)) u_smp (
    .clk(clk), .rst_n(rst_n), .s(done), .error(error), .trg(trg), .c(c)
  );

  dual_use_rx_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .c(c), .ack_in(rx_ack),
    .req(rx_req), .f_en(f_en), .ack_out(dibus_ack)
  );

endmodule
