// Testbench for di_encoder: all 256 payloads of the 8-bit 3-of-6 and 2-of-5
// buses and random 16-bit 2-of-5 payloads, against the reference encoding
// built from the hand-written code tables. Also checks the rail counts
// (16, 18 and 31 rails).
module tb_di_encoder;
  import ftdi_pkg::*;
  import tb_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] c;
  logic [total_rails(8, CODE_3OF6)-1:0]  ra;
  logic [total_rails(8, CODE_2OF5)-1:0]  rb;
  logic [total_rails(16, CODE_2OF5)-1:0] rc;
  int checks = 0, failures = 0;

  di_encoder #(.DATA_W(8),  .CODE(CODE_3OF6)) u_a (.data(a), .rails(ra));
  di_encoder #(.DATA_W(8),  .CODE(CODE_2OF5)) u_b (.data(b), .rails(rb));
  di_encoder #(.DATA_W(16), .CODE(CODE_2OF5)) u_c (.data(c), .rails(rc));

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
    int n;
    logic [127:0] e;
    check($bits(ra) == 16 && $bits(rb) == 18 && $bits(rc) == 31, "rail counts");
    for (int t = 0; t < 256; t++) begin
      a = 8'(t); b = 8'(t); c = 16'($urandom);
      #1;
      e = ref_bus(64'(a), 8, 1'b1, n);
      check(n == 16 && ra == e[15:0], $sformatf("3of6 %h: %b want %b", a, ra, e[15:0]));
      e = ref_bus(64'(b), 8, 1'b0, n);
      check(n == 18 && rb == e[17:0], $sformatf("2of5 %h: %b want %b", b, rb, e[17:0]));
      e = ref_bus(64'(c), 16, 1'b0, n);
      check(n == 31 && rc == e[30:0], $sformatf("2of5 16b %h: %b want %b", c, rc, e[30:0]));
    end
    a = 8'h00; #1;
    check(ra == 16'b0001_111000_111000, "payload 0x00 sends 111000 twice and check 0001");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
