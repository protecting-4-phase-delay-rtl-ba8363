// 3-of-6 decoder matching enc_3of6, safe against one transient fault.
//
// (d1,d0) are read straight from rails (x1,x0); (d3,d2) come from the upper
// rails with one small equation per value of (x1,x0). Besides the 16 used
// code words the decoder may see a word that a single fault produced. For
// every such invalid word (two or four ones) the equations give either the
// data word that was sent or a word with different check bits (d3,d2), so the
// parity check at the receiver detects the fault. The term (~x5 & x3) in d3
// for (x1,x0) = 00 only matters for the invalid word 010100, which would
// otherwise decode to 1100, a word whose check bits match one of its possible
// originals. The four unused code words cannot be decoded safely and raise
// decode_err instead. Purely combinational.
module dec_3of6 (
  input  logic [5:0] x,
  output logic [3:0] d,
  output logic       decode_err
);

  logic [3:0] up;
  assign up = x[5:2];

  always_comb begin
    d[1:0] = x[1:0];
    unique case (x[1:0])
      2'b11: d[3:2] = {x[3] | x[5], x[2] | x[5]};                 // one-hot
      2'b00: d[3:2] = {(~x[5] & x[3]) | ~x[4], ~x[3] | ~x[4]};    // one-cold
      2'b01: d[3:2] = {x[4], x[3]};
      2'b10: d[3:2] = {x[2] & (x[5] | x[4]), x[4]};
      default: d[3:2] = 2'b00;
    endcase
    decode_err = ((x[1:0] == 2'b01) && (up == 4'b0011 || up == 4'b0101)) ||
                 ((x[1:0] == 2'b10) && (up == 4'b1100 || up == 4'b1010));
  end

endmodule
