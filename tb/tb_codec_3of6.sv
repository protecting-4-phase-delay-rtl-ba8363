// Testbench for enc_3of6 and dec_3of6: compares every code word with the
// hand-written table, checks the 4 x K4 clique property of the check-bit
// groups, the decoding of all 64 input words, and that every word a single
// transient fault can leave in the input register is either decoded to the
// sent data, flagged, or decoded to data with different check bits (d3,d2).
module tb_codec_3of6;
  import tb_ref_pkg::*;

  logic [3:0] d, dq;
  logic [5:0] x, xq;
  logic       derr;
  int checks = 0, failures = 0;

  enc_3of6 u_enc (.d(d), .x(x));
  dec_3of6 u_dec (.x(xq), .d(dq), .decode_err(derr));

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

  initial begin
    logic [63:0] cd_mask, used_mask, cap;
    cd_mask = '0;
    used_mask = '0;
    for (int y = 0; y < 64; y++) if (popcount(64'(y)) >= 3) cd_mask[y] = 1'b1;
    for (int i = 0; i < 16; i++) used_mask[REF36[i]] = 1'b1;

    // Encoder against the table.
    for (int i = 0; i < 16; i++) begin
      d = 4'(i);
      #1;
      check(x == REF36[i], $sformatf("enc %b -> %b, want %b", d, x, REF36[i]));
    end
    // Examples stated for this code.
    check(REF36[0] == 6'b111000, "di(0000) = 111000");
    // Clique property: same check bits -> at most one common rail.
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++)
        if (i[3:2] == j[3:2])
          check(popcount(64'(REF36[i] & REF36[j])) <= 1,
                $sformatf("words %0d and %0d of one PBCB group overlap", i, j));
    // Decoder on used and unused words.
    for (int i = 0; i < 16; i++) begin
      xq = REF36[i];
      #1;
      check(dq == 4'(i) && !derr, $sformatf("dec %b -> %b err %b", xq, dq, derr));
    end
    for (int i = 0; i < 4; i++) begin
      xq = UNUSED36[i];
      #1;
      check(derr, $sformatf("unused %b not flagged", xq));
    end
    xq = 6'b101001; #1; check(dq == 4'b0101, "dec 101001 = 0101");
    xq = 6'b111001; #1; check(dq == 4'b1101, "dec 111001 = 1101");
    xq = 6'b010100; #1; check(dq != 4'b1100, "dec 010100 != 1100");
    // Single-fault safety.
    for (int i = 0; i < 16; i++) begin
      cap = captures(REF36[i], cd_mask, 6);
      for (int y = 0; y < 64; y++) begin
        if (cap[y]) begin
          xq = 6'(y);
          #1;
          check(dq == 4'(i) || derr || dq[3:2] != 2'(i >> 2),
                $sformatf("sent %b captured %b decodes to %b undetected", REF36[i], xq, dq));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
