// Testbench for enc_2of5 and dec_2of5: code words against the hand-written
// table, disjointness of the two words of every check-bit group (4 x K2),
// decoding of the used words, and single-fault safety of every word that can
// be captured (decoded to the sent data or to data with other check bits).
module tb_codec_2of5;
  import tb_ref_pkg::*;

  logic [2:0] d, dq;
  logic [4:0] x, xq;
  int checks = 0, failures = 0;

  enc_2of5 u_enc (.d(d), .x(x));
  dec_2of5 u_dec (.x(xq), .d(dq));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Words accepted by the completion detector: ones in two of the rail
  // groups {x0,x1}, {x4}, {x2,x3}.
  function automatic bit cd_fires(logic [4:0] w);
    return (((w[0] | w[1]) ? 1 : 0) + (w[4] ? 1 : 0) + ((w[2] | w[3]) ? 1 : 0)) >= 2;
  endfunction

  initial begin
    logic [63:0] cd_mask, cap;
    cd_mask = '0;
    for (int y = 0; y < 32; y++) if (cd_fires(5'(y))) cd_mask[y] = 1'b1;
    for (int i = 0; i < 8; i++) begin
      d = 3'(i);
      #1;
      check(x == REF25[i], $sformatf("enc %b -> %b, want %b", d, x, REF25[i]));
      check(popcount(64'(x)) == 2 && cd_mask[6'(x)], "2-of-5 word accepted by the detector");
      check(x[4] == d[0], "d0 sent on x4");
    end
    for (int i = 0; i < 8; i += 2)
      check((REF25[i] & REF25[i+1]) == 0, $sformatf("group %0d words overlap", i / 2));
    for (int i = 0; i < 8; i++) begin
      xq = REF25[i];
      #1;
      check(dq == 3'(i), $sformatf("dec %b -> %b", xq, dq));
    end
    for (int i = 0; i < 8; i++) begin
      cap = captures({1'b0, REF25[i]}, cd_mask, 5);
      for (int y = 0; y < 32; y++) begin
        if (cap[y]) begin
          xq = 5'(y);
          #1;
          check(dq == 3'(i) || dq[2:1] != 2'(i >> 1),
                $sformatf("sent %b captured %b decodes to %b undetected", REF25[i], xq, dq));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
