// Testbench for check_bits_gen: random payloads for three configurations
// (8 bits 3-of-6, 8 bits 2-of-5 with a 1-of-4 last block, 16 bits 2-of-5 with
// a 1-of-2 last block) against a parity computed here block by block.
module tb_check_bits_gen;
  import ftdi_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] c;
  logic [1:0]  ca, cb, cc;
  int checks = 0, failures = 0;

  check_bits_gen #(.DATA_W(8),  .CODE(CODE_3OF6)) u_a (.data(a), .check(ca));
  check_bits_gen #(.DATA_W(8),  .CODE(CODE_2OF5)) u_b (.data(b), .check(cb));
  check_bits_gen #(.DATA_W(16), .CODE(CODE_2OF5)) u_c (.data(c), .check(cc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [1:0] ea, eb, ec;
      a = 8'($urandom); b = 8'($urandom); c = 16'($urandom);
      if (t < 256) a = 8'(t);
      #1;
      ea = a[3:2] ^ a[7:6];                                  // two 4-bit blocks
      eb = b[2:1] ^ b[5:4] ^ b[7:6];                         // 3 + 3 + 2 bits
      ec = {1'b0, c[15]};                                    // 5 x 3 bits + 1
      for (int i = 0; i < 5; i++) ec ^= {c[3*i+2], c[3*i+1]};
      checks++;
      if (ca != ea || cb != eb || cc != ec) begin
        failures++;
        $display("FAIL a=%h ca=%b/%b b=%h cb=%b/%b c=%h cc=%b/%b", a, ca, ea, b, cb, eb, c, cc, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
