// Shared types and layout arithmetic for the fault-tolerant 4-phase
// delay-insensitive (DI) link.
//
// The payload of DATA_W bits is cut into k-bit data blocks, each sent as one
// m-of-n code word (3-of-6 carries k = 4 bits, 2-of-5 carries k = 3 bits).
// Bits that do not fill a whole block travel in a 1-of-4 (two bits) or 1-of-2
// (one bit) block. Every block contributes J = 2 per block check bits (PBCB);
// their bitwise XOR is the single check block, sent in 1-of-4 code. This is
// the f = 1 (one transient fault) configuration.
//
// Rail layout of the DI bus, lowest rails first:
//   full data blocks 0 .. NFULL-1 (n rails each), remainder block, check block.
package ftdi_pkg;

  typedef enum logic [0:0] {
    CODE_2OF5 = 1'b0,
    CODE_3OF6 = 1'b1
  } di_code_e;

  // Width of the per block check bits and of the check block (f = 1).
  localparam int unsigned PBCB_W    = 2;
  localparam int unsigned CHECK_RAILS = 4;  // 1-of-4 check block

  // Data bits per m-of-n block.
  function automatic int unsigned blk_k(di_code_e code);
    return (code == CODE_3OF6) ? 4 : 3;
  endfunction

  // Rails per m-of-n block.
  function automatic int unsigned blk_n(di_code_e code);
    return (code == CODE_3OF6) ? 6 : 5;
  endfunction

  function automatic int unsigned n_full(int unsigned data_w, di_code_e code);
    return data_w / blk_k(code);
  endfunction

  // Bits left for the remainder block (0, 1 or 2; 3-of-6 never leaves 3 for
  // the power-of-two widths this link is meant for).
  function automatic int unsigned rem_bits(int unsigned data_w, di_code_e code);
    return data_w % blk_k(code);
  endfunction

  // Rails of the remainder block: 1-of-2 for one bit, 1-of-4 for two.
  function automatic int unsigned rem_rails(int unsigned data_w, di_code_e code);
    return (rem_bits(data_w, code) == 0) ? 0 : (1 << rem_bits(data_w, code));
  endfunction

  function automatic int unsigned data_rails(int unsigned data_w, di_code_e code);
    return n_full(data_w, code) * blk_n(code) + rem_rails(data_w, code);
  endfunction

  function automatic int unsigned total_rails(int unsigned data_w, di_code_e code);
    return data_rails(data_w, code) + CHECK_RAILS;
  endfunction

endpackage
