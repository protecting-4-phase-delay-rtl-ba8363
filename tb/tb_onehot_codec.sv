// Testbench for enc_1ofn, dec_1ofn and cd_1ofn with K = 1 and K = 2: every
// value is encoded to the single expected rail, decoded back, and detected
// as complete; the spacer is not.
module tb_onehot_codec;
  logic [1:0] d2, q2;
  logic [3:0] x4;
  logic       d1, q1;
  logic [1:0] x2;
  logic       cd4, cd2;
  int checks = 0, failures = 0;

  enc_1ofn #(.K(2)) ue2 (.d(d2), .x(x4));
  dec_1ofn #(.K(2)) ud2 (.x(x4), .d(q2));
  cd_1ofn  #(.N(4)) uc4 (.x(x4), .done(cd4));
  enc_1ofn #(.K(1)) ue1 (.d(d1), .x(x2));
  dec_1ofn #(.K(1)) ud1 (.x(x2), .d(q1));
  cd_1ofn  #(.N(2)) uc2 (.x(x2), .done(cd2));

  logic [3:0] xs;
  logic       cds;
  cd_1ofn #(.N(4)) ucs (.x(xs), .done(cds));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      d2 = 2'(v); d1 = v[0];
      #1;
      check(x4 == (4'b0001 << v), $sformatf("1-of-4 enc %0d -> %b", v, x4));
      check(q2 == 2'(v) && cd4, "1-of-4 dec/cd");
      check(x2 == (2'b01 << v[0]), "1-of-2 enc");
      check(q1 == v[0] && cd2, "1-of-2 dec/cd");
    end
    xs = '0; #1; check(!cds, "spacer not complete");
    xs = 4'b0100; #1; check(cds, "one rail complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
