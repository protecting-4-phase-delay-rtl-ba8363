// Reference material shared by the testbenches: the code word tables of the
// 3-of-6 and 2-of-5 block codes written out by hand, and the single-fault
// capture model of the receiver (which words can end up in the input
// register when one transient fault hits a block while it is being sent).
package tb_ref_pkg;

  // 3-of-6 code word of data value d (index), rails x5..x0.
  localparam logic [5:0] REF36 [16] = '{
    6'b111000, 6'b100101, 6'b001110, 6'b010011,
    6'b110100, 6'b101001, 6'b011010, 6'b000111,
    6'b011100, 6'b110001, 6'b100110, 6'b001011,
    6'b101100, 6'b011001, 6'b010110, 6'b100011
  };
  // The four 3-of-6 words that are never sent.
  localparam logic [5:0] UNUSED36 [4] = '{6'b001101, 6'b110010, 6'b010101, 6'b101010};

  // 2-of-5 code word of data value d, rails x4..x0.
  localparam logic [4:0] REF25 [8] = '{
    5'b01010, 5'b10001, 5'b00101, 5'b10010,
    5'b01001, 5'b10100, 5'b00110, 5'b11000
  };

  function automatic int unsigned popcount(logic [63:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 64; i++) n += v[i];
    return n;
  endfunction

  // Set of words that may be captured when `c` (nb rails) is sent and at most
  // one fault occurs. `cd_mask` marks the words that complete the block's
  // completion detector. Case 1: no fault changes the triggering word; one
  // fault may still flip a rail before capture. Case 2: a fault completes a
  // different word x; until capture, the rails may be anywhere between c and x.
  function automatic logic [63:0] captures(logic [5:0] c, logic [63:0] cd_mask, int nb);
    logic [63:0] res = '0;
    res[c] = 1'b1;
    for (int i = 0; i < nb; i++) res[c ^ (6'd1 << i)] = 1'b1;
    for (int x = 0; x < (1 << nb); x++) begin
      if (cd_mask[x] && popcount(64'(x) & ~64'(c)) <= 1) begin
        logic [5:0] free, base;
        free = c ^ 6'(x);
        base = c & 6'(x);
        for (int y = 0; y < (1 << nb); y++) begin
          if ((6'(y) & ~free) == base) res[y] = 1'b1;
        end
      end
    end
    return res;
  endfunction

  // Reference DI encoding of a whole bus word: data blocks from the tables
  // above, leftover bits in 1-of-2/1-of-4, then the 1-of-4 check block whose
  // value is the XOR of the two top bits of each full block and of the
  // leftover bits. Returns the rails (low rails first) and their number.
  function automatic logic [127:0] ref_bus(logic [63:0] data, int data_w, bit is36,
                                           output int rails);
    int k = is36 ? 4 : 3;
    int n = is36 ? 6 : 5;
    int nfull = data_w / k;
    int rem = data_w % k;
    int pos = 0;
    logic [1:0] chk = '0;
    logic [127:0] r = '0;
    for (int b = 0; b < nfull; b++) begin
      int v = 0;
      for (int i = 0; i < k; i++) v |= int'(data[b*k + i]) << i;
      for (int i = 0; i < n; i++) r[pos + i] = is36 ? REF36[v][i] : REF25[v][i];
      chk ^= 2'(v >> (k - 2));
      pos += n;
    end
    if (rem != 0) begin
      int v = 0;
      for (int i = 0; i < rem; i++) v |= int'(data[nfull*k + i]) << i;
      r[pos + v] = 1'b1;
      chk ^= 2'(v);
      pos += (1 << rem);
    end
    r[pos + int'(chk)] = 1'b1;
    rails = pos + 4;
    return r;
  endfunction

endpackage
