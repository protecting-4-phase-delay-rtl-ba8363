// DI encoder of the whole bus.
//
// Data block i (bits [i*k +: k]) is encoded with the block code (3-of-6 or
// 2-of-5) onto rails [i*n +: n]. Leftover payload bits go into a 1-of-4 or
// 1-of-2 block above them, and the 1-of-4 encoded check block from
// check_bits_gen occupies the top four rails. Every block carries exactly one
// valid code word, so the whole bus is a delay-insensitive code word.
// Purely combinational; the spacer is produced downstream.
module di_encoder
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter di_code_e    CODE   = CODE_3OF6,
  localparam int unsigned RAILS = total_rails(DATA_W, CODE)
) (
  input  logic [DATA_W-1:0] data,
  output logic [RAILS-1:0]  rails
);

  localparam int unsigned K     = blk_k(CODE);
  localparam int unsigned N     = blk_n(CODE);
  localparam int unsigned NFULL = n_full(DATA_W, CODE);
  localparam int unsigned REM   = rem_bits(DATA_W, CODE);
  localparam int unsigned DR    = data_rails(DATA_W, CODE);

  for (genvar i = 0; i < NFULL; i++) begin : g_blk
    if (CODE == CODE_3OF6) begin : g_36
      enc_3of6 u_enc (.d(data[i*K +: K]), .x(rails[i*N +: N]));
    end else begin : g_25
      enc_2of5 u_enc (.d(data[i*K +: K]), .x(rails[i*N +: N]));
    end
  end

  if (REM != 0) begin : g_rem
    enc_1ofn #(.K(REM)) u_enc (
      .d(data[DATA_W-1 -: REM]),
      .x(rails[NFULL*N +: (1 << REM)])
    );
  end

  logic [PBCB_W-1:0] check;
  check_bits_gen #(.DATA_W(DATA_W), .CODE(CODE)) u_chk (.data(data), .check(check));
  enc_1ofn #(.K(PBCB_W)) u_chk_enc (.d(check), .x(rails[DR +: CHECK_RAILS]));

endmodule
