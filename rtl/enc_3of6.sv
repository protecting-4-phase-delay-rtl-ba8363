// 3-of-6 encoder for one 4-bit data block (fault assumption f = 1).
//
// The two low data bits are sent unchanged on rails (x1, x0) and steer the
// code of the upper rails x5..x2:
//   (d1,d0) = 11 : one-hot upper rails
//   (d1,d0) = 00 : one-cold upper rails
//   (d1,d0) = 01 : two upper ones, (x4,x3) = (d3,d2)
//   (d1,d0) = 10 : two upper ones, chosen from the four words left over
// The four data words that share the per block check bits (d3,d2) are
// mutually disjoint in all but at most one rail, so a single transient fault
// can never turn one of them into another: each PBCB group is a 4-clique of
// the safe overlap graph (4 x K4 partitioning). d = 0000 gives 111000.
// The words 001101, 110010, 010101 and 101010 are never sent.
// Purely combinational.
module enc_3of6 (
  input  logic [3:0] d,
  output logic [5:0] x
);

  logic [3:0] up;

  always_comb begin
    unique case (d)
      4'b0000: up = 4'b1110;
      4'b0100: up = 4'b1101;
      4'b1000: up = 4'b0111;
      4'b1100: up = 4'b1011;
      4'b0001: up = 4'b1001;
      4'b0101: up = 4'b1010;
      4'b1001: up = 4'b1100;
      4'b1101: up = 4'b0110;
      4'b0010: up = 4'b0011;
      4'b0110: up = 4'b0110;
      4'b1010: up = 4'b1001;
      4'b1110: up = 4'b0101;
      4'b0011: up = 4'b0100;
      4'b0111: up = 4'b0001;
      4'b1011: up = 4'b0010;
      4'b1111: up = 4'b1000;
      default: up = 4'b1110;
    endcase
    x = {up, d[1:0]};
  end

endmodule
