// Decoding and error detection on the receiver's captured DI word.
//
// Each data block is DI-decoded; from the decoded data the check bits
// generator recomputes the check block, which is compared with the decoded
// received check block (checkblock_error). The 3-of-6 decoders also report
// unused code words (decode_error). error = checkblock_error | decode_error
// tells the sampler to take a new snapshot. With at most one transient fault
// on the bus, a captured word that passes both checks carries the payload
// that was sent. Purely combinational; its worst-case delay is what Delta_ED
// of the sampler must cover.
module rx_error_detect
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter di_code_e    CODE   = CODE_3OF6,
  localparam int unsigned RAILS = total_rails(DATA_W, CODE)
) (
  input  logic [RAILS-1:0]  rails,
  output logic [DATA_W-1:0] data,
  output logic              checkblock_error,
  output logic              decode_error,
  output logic              error
);

  localparam int unsigned K     = blk_k(CODE);
  localparam int unsigned N     = blk_n(CODE);
  localparam int unsigned NFULL = n_full(DATA_W, CODE);
  localparam int unsigned REM   = rem_bits(DATA_W, CODE);
  localparam int unsigned DR    = data_rails(DATA_W, CODE);

  logic [NFULL-1:0] blk_err;

  for (genvar i = 0; i < NFULL; i++) begin : g_blk
    if (CODE == CODE_3OF6) begin : g_36
      dec_3of6 u_dec (.x(rails[i*N +: N]), .d(data[i*K +: K]), .decode_err(blk_err[i]));
    end else begin : g_25
      dec_2of5 u_dec (.x(rails[i*N +: N]), .d(data[i*K +: K]));
      assign blk_err[i] = 1'b0;
    end
  end

  if (REM != 0) begin : g_rem
    dec_1ofn #(.K(REM)) u_dec (
      .x(rails[NFULL*N +: (1 << REM)]),
      .d(data[DATA_W-1 -: REM])
    );
  end

  logic [PBCB_W-1:0] check_rx, check_calc;
  dec_1ofn #(.K(PBCB_W)) u_chk_dec (.x(rails[DR +: CHECK_RAILS]), .d(check_rx));
  check_bits_gen #(.DATA_W(DATA_W), .CODE(CODE)) u_chk (.data(data), .check(check_calc));

  assign checkblock_error = (check_rx != check_calc);
  assign decode_error     = |blk_err;
  assign error            = checkblock_error | decode_error;

endmodule
