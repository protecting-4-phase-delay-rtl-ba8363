// Testbench for rx_error_detect on the 8-bit 3-of-6 bus and the 8-bit 2-of-5
// bus. Fault-free words must decode without error. Then each data block is
// replaced by every word one transient fault can leave in it: the result must
// either be flagged (error) or carry the sent payload. The three fault
// classes of the document's simulation are checked explicitly: another valid
// word (check block error), an unused word (decode error) and an invalid one.
module tb_rx_error_detect;
  import ftdi_pkg::*;
  import tb_ref_pkg::*;

  logic [15:0] ra;
  logic [17:0] rb;
  logic [7:0]  da, db;
  logic        cea, dea, ea, ceb, deb, eb;
  int checks = 0, failures = 0;

  rx_error_detect #(.DATA_W(8), .CODE(CODE_3OF6)) u_a (
    .rails(ra), .data(da), .checkblock_error(cea), .decode_error(dea), .error(ea));
  rx_error_detect #(.DATA_W(8), .CODE(CODE_2OF5)) u_b (
    .rails(rb), .data(db), .checkblock_error(ceb), .decode_error(deb), .error(eb));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [127:0] e;
    logic [63:0] m36, m25, cap;
    m36 = '0; m25 = '0;
    for (int y = 0; y < 64; y++) if ($countones(y[5:0]) >= 3) m36[y] = 1'b1;
    for (int y = 0; y < 32; y++)
      if ((((y[0] | y[1]) ? 1 : 0) + (y[4] ? 1 : 0) + ((y[2] | y[3]) ? 1 : 0)) >= 2) m25[y] = 1'b1;

    for (int t = 0; t < 256; t++) begin
      e = ref_bus(64'(t), 8, 1'b1, n); ra = e[15:0];
      e = ref_bus(64'(t), 8, 1'b0, n); rb = e[17:0];
      #1;
      check(da == 8'(t) && !ea && db == 8'(t) && !eb, $sformatf("clean word %h", t));
      if (t % 5 == 0) begin
        // every single-fault capture in each data block
        for (int blk = 0; blk < 2; blk++) begin
          logic [15:0] base_a;
          logic [17:0] base_b;
          e = ref_bus(64'(t), 8, 1'b1, n); base_a = e[15:0];
          cap = captures(6'(base_a[blk*6 +: 6]), m36, 6);
          for (int y = 0; y < 64; y++) if (cap[y]) begin
            ra = base_a; ra[blk*6 +: 6] = 6'(y);
            #1;
            check(ea || da == 8'(t), $sformatf("3of6 %h blk%0d word %b slips through", t, blk, y[5:0]));
          end
          e = ref_bus(64'(t), 8, 1'b0, n); base_b = e[17:0];
          cap = captures({1'b0, base_b[blk*5 +: 5]}, m25, 5);
          for (int y = 0; y < 32; y++) if (cap[y]) begin
            rb = base_b; rb[blk*5 +: 5] = 5'(y);
            #1;
            check(eb || db == 8'(t), $sformatf("2of5 %h blk%0d word %b slips through", t, blk, y[4:0]));
          end
        end
      end
    end
    // Payload 0x00 (both blocks 111000, check 0001) with the three fault classes.
    ra = 16'b0001_111000_101001; #1;   // other valid word
    check(cea && da[3:0] == 4'b0101, "valid-word fault caught by check block");
    ra = 16'b0001_111000_101010; #1;   // unused word
    check(dea && !cea, "unused word caught by decode error only");
    ra = 16'b0001_111000_111001; #1;   // invalid word
    check(cea && da[3:0] == 4'b1101, "invalid word caught by check block");
    ra = 16'b0010_111000_111000; #1;   // check block hit
    check(cea, "check block fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
