// Check bits generator (f = 1).
//
// For every data block it forms the per block check bits (PBCB): the two most
// significant bits of an m-of-n block (f_c(d) = (d3,d2) for 3-of-6 and
// (d2,d1) for 2-of-5), or the whole block, zero-extended, for a 1-of-4 or
// 1-of-2 remainder block. The check block is the 2-bit parity over all PBCB,
// i.e. their bitwise XOR; one check block is enough to expose a single
// faulty block whatever the number of data blocks. Purely combinational.
module check_bits_gen
  import ftdi_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter di_code_e    CODE   = CODE_3OF6
) (
  input  logic [DATA_W-1:0] data,
  output logic [PBCB_W-1:0] check
);

  localparam int unsigned K     = blk_k(CODE);
  localparam int unsigned NFULL = n_full(DATA_W, CODE);
  localparam int unsigned REM   = rem_bits(DATA_W, CODE);

  always_comb begin
    check = '0;
    for (int i = 0; i < NFULL; i++) begin
      check ^= data[i*K + K - 1 -: PBCB_W];
    end
    if (REM != 0) begin
      check ^= PBCB_W'(data[DATA_W-1 -: ((REM == 0) ? 1 : REM)]);
    end
  end

endmodule
