// 1-of-2^K encoder: sets exactly the rail numbered by the data value.
// Used for the check block (1-of-4) and for a data block that only has one or
// two payload bits left (1-of-2, 1-of-4). Purely combinational.
module enc_1ofn #(
  parameter int unsigned K = 2
) (
  input  logic [K-1:0]      d,
  output logic [(1<<K)-1:0] x
);

  always_comb begin
    x = '0;
    x[d] = 1'b1;
  end

endmodule
