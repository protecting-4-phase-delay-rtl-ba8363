// Completion detector for a 1-of-n block: the OR of its rails. A 1-of-n code
// word is complete with its single transition, so no C gate is needed; the
// bus-level C gate joins this output with the other blocks' detectors.
// Purely combinational.
module cd_1ofn #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  output logic         done
);

  assign done = |x;

endmodule
