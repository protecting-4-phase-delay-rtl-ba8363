// Completion detector for one 3-of-6 block.
//
// A six-input sorting network (rows of OR/AND compare-exchange pairs) sorts
// the rails so that output T_i is one when at least i rails are one. T1, T2
// and T3 drive a three-input C gate: done rises once three rails are set and
// falls only when every rail has returned to zero (spacer). The detector also
// fires on the four unused 3-of-6 words; the decoder flags those.
// done follows the rails with one clk cycle of latency (C gate state).
module cd_3of6 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] x,
  output logic       done
);

  // Bubble-sort network: after all rows, s[0] is the OR of the rails and
  // s[i] is one when at least i+1 rails are one.
  logic [5:0] s;
  always_comb begin
    s = x;
    for (int r = 0; r < 6; r++) begin
      for (int i = 5; i > r; i--) begin
        logic hi, lo;
        hi = s[i] | s[i-1];
        lo = s[i] & s[i-1];
        s[i-1] = hi;
        s[i]   = lo;
      end
    end
  end

  c_element #(.N(3), .INIT(1'b0)) u_c (
    .clk(clk), .rst_n(rst_n), .in(s[2:0]), .q(done)
  );

endmodule
