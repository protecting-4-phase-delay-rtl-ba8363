// 1-of-2^K decoder: returns the index of the set rail. A word with several
// rails set (only possible after a fault) decodes to the OR of their indices;
// for these blocks the check bits are the data itself, so any wrong value is
// caught by the parity check. Purely combinational.
module dec_1ofn #(
  parameter int unsigned K = 2
) (
  input  logic [(1<<K)-1:0] x,
  output logic [K-1:0]      d
);

  always_comb begin
    d = '0;
    for (int i = 0; i < (1 << K); i++) begin
      if (x[i]) d = d | K'(i);
    end
  end

endmodule
