// 2-of-5 encoder for one 3-bit data block (fault assumption f = 1).
//
// d0 is sent unchanged on rail x4. With d0 = 1 the second one sits on rail
// x[{d2,d1}] (one-hot among x3..x0); with d0 = 0 one rail of {x0,x1} and one
// rail of {x2,x3} are set: x2 = d1, x3 = ~d1, x0 = d2 ^ d1, x1 = ~x0.
// The two data words sharing the per block check bits (d2,d1) never share a
// rail, so each check-bit group is a 2-clique of the safe overlap graph
// (4 x K2). The two words with both ones inside {x0,x1} or inside {x2,x3}
// are not used; the completion detector ignores them. Purely combinational.
module enc_2of5 (
  input  logic [2:0] d,
  output logic [4:0] x
);

  always_comb begin
    x = '0;
    if (d[0]) begin
      x[4]    = 1'b1;
      x[{1'b0, d[2:1]}] = 1'b1;
    end else begin
      x[0] = d[2] ^ d[1];
      x[1] = ~(d[2] ^ d[1]);
      x[2] = d[1];
      x[3] = ~d[1];
    end
  end

endmodule
