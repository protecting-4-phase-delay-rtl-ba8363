// 2-of-5 decoder matching enc_2of5, safe against one transient fault.
//
// d0 is rail x4. With x4 set, (d2,d1) is the index of the other one among
// x3..x0; otherwise d1 = x2 and d2 = x2 ^ x0. Every invalid word that a single
// fault can leave in the receiver's input register decodes either to the word
// that was sent or to one with different check bits (d2,d1); the term
// (x1 & ~x2) exists for the invalid word 10110, which would otherwise decode
// to 111 and hide a fault on a transmitted 110. No decode error output is
// needed. Purely combinational.
module dec_2of5 (
  input  logic [4:0] x,
  output logic [2:0] d
);

  always_comb begin
    d[0] = x[4];
    if (x[4]) begin
      d[2] = x[2] | x[3];
      d[1] = x[3] | (x[1] & ~x[2]);
    end else begin
      d[2] = x[2] ^ x[0];
      d[1] = x[2];
    end
  end

endmodule
